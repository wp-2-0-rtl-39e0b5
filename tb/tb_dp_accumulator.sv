// tb_dp_accumulator: self-checking test of the result accumulator.
//
// Feeds carry-save wave results (a random split of a random value into sum
// and carry) with random valid and start-of-vector tags, and compares acc and
// elems after every strobe edge with a reference model kept here. Includes
// full 1024-element vectors of maximal products to check the accumulator
// width, and counts how often sof, bubbles and full vectors occurred.
module tb_dp_accumulator;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  wave_out_t        d = '0;
  logic [ACC_W-1:0] acc;
  logic [CNT_W-1:0] elems;
  int checks = 0;
  int failures = 0;
  int n_sof = 0, n_bubble = 0, n_full = 0;

  longint unsigned m_acc = 0;
  int unsigned     m_elems = 0;

  dp_accumulator dut (.strobe_out(clk), .rst_n(rst_n), .d(d), .acc(acc), .elems(elems));

  always #500 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: acc=%0d exp=%0d elems=%0d exp=%0d",
                                  what, $time, acc, m_acc, elems, m_elems);
    end
  endtask

  // One wave whose dot product is val, split into a carry-save pair.
  task automatic wave(bit vld, bit sof, int unsigned val);
    logic [CS_W-1:0] s;
    @(negedge clk);
    s = CS_W'($urandom);
    d.sum   = s;
    d.carry = CS_W'(val) - s;
    d.tag   = '{vld: vld, sof: sof};
    @(posedge clk);
    #1;
    if (vld) begin
      if (sof) begin
        m_acc = val;
        m_elems = N_PAIRS;
        n_sof++;
      end else begin
        m_acc = (m_acc + val) % (64'd1 << ACC_W);
        m_elems += N_PAIRS;
      end
    end else begin
      n_bubble++;
    end
    check(acc == ACC_W'(m_acc) && elems == CNT_W'(m_elems), "accumulate");
    if (m_elems == MAX_ELEMS) n_full++;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    rst_n = 1'b0;
    #1;
    check(acc == '0 && elems == '0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    // Full vector of the largest products: 1024 * 255 * 255.
    for (int w = 0; w < int'(MAX_ELEMS / N_PAIRS); w++) wave(1'b1, w == 0, 8 * 255 * 255);
    check(acc == ACC_W'(1024 * 255 * 255), "full vector of maximal products fits");
    // Random vectors of random length with bubbles.
    for (int v = 0; v < 40; v++) begin
      int unsigned len;
      len = 1 + $urandom_range(0, MAX_ELEMS / N_PAIRS - 1);
      for (int w = 0; w < int'(len); w++) begin
        if ($urandom_range(0, 3) == 0) wave(1'b0, $urandom_range(0, 1) == 1, $urandom_range(0, 8 * 255 * 255));
        wave(1'b1, w == 0, $urandom_range(0, 8 * 255 * 255));
      end
    end
    check(n_sof > 0 && n_bubble > 0 && n_full > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
