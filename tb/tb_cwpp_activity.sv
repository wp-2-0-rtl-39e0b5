// tb_cwpp_activity: the dot-product unit under input vectors of controlled
// toggling activity, at its default parameters and a 1 ns launch period.
//
// For activities of 0, 12.5, 25, ... 100 percent, every operand bit flips
// from one wave to the next with that probability (100 % = every bit flips
// on every wave, 0 % = operands never change). Each activity level runs one full
// 1024-element vector with the strobe delay inside the valid window, and the
// final accumulator value is compared with a dot product computed here. The
// test also counts how many bits of the input and output sampling registers
// changed, as a measure of the switching the activity causes; at 0 % no
// operand register bit may toggle, and the count must grow with activity.
module tb_cwpp_activity;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T      = 1000;
  localparam int unsigned SEL_OK = 55;   // 1200 + 55 * 15 = 2025 ps, in [2016, 2040)
  localparam int unsigned NWAVES = MAX_ELEMS / N_PAIRS;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic             vld = 1'b0;
  logic             sof = 1'b0;
  opvec_t           a = '0, b = '0;
  logic [6:0]       dly_sel = 7'(SEL_OK);
  logic             strobe_out;
  logic [ACC_W-1:0] acc;
  logic [CNT_W-1:0] elems;

  cwpp_dot_product dut (
    .clk_in(clk), .rst_n(rst_n), .vld(vld), .sof(sof), .a(a), .b(b),
    .dly_sel(dly_sel), .strobe_out(strobe_out), .acc(acc), .elems(elems)
  );

  int checks = 0;
  int failures = 0;

  always #(T / 2) clk = ~clk;

  // Register bit toggles on both sides of the wave network.
  longint unsigned in_toggles = 0, out_toggles = 0;
  wave_in_t  prev_in;
  wave_out_t prev_out;
  always @(posedge clk) begin
    #1;
    in_toggles += $countones({dut.wave_in.a, dut.wave_in.b} ^ {prev_in.a, prev_in.b});
    prev_in = dut.wave_in;
  end
  always @(posedge strobe_out) begin
    #1;
    out_toggles += $countones({dut.sampled.sum, dut.sampled.carry} ^ {prev_out.sum, prev_out.carry});
    prev_out = dut.sampled;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Flip each bit of v with probability num/8.
  function automatic opvec_t flip(opvec_t v, int unsigned num);
    for (int p = 0; p < int'(N_PAIRS); p++)
      for (int j = 0; j < int'(DATA_W); j++)
        if ($urandom_range(0, 7) < num) v[p][j] = ~v[p][j];
    return v;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expected, prev_toggles;
    #1;
    rst_n = 1'b0;
    #(4 * T);
    rst_n = 1'b1;
    // Random starting operands, so the 0 % vector is a non-trivial constant.
    a = flip(a, 4);
    b = flip(b, 4);
    prev_toggles = 0;
    for (int unsigned lvl = 0; lvl <= 8; lvl++) begin
      longint unsigned t0;
      expected = 0;
      repeat (8) @(negedge clk);
      t0 = in_toggles;
      for (int w = 0; w < int'(NWAVES); w++) begin
        @(negedge clk);
        a = flip(a, lvl);
        b = flip(b, lvl);
        vld = 1'b1;
        sof = (w == 0);
        for (int p = 0; p < int'(N_PAIRS); p++) expected += longint'(a[p]) * longint'(b[p]);
      end
      @(negedge clk);
      vld = 1'b0;
      sof = 1'b0;
      // Last wave: captured by the strobe of the next launch, added on the one after.
      repeat (6) @(negedge clk);
      check(acc == ACC_W'(expected) && elems == CNT_W'(MAX_ELEMS),
            $sformatf("activity %0d/8: acc=%0d expected=%0d", lvl, acc, expected));
      $display("activity %5.1f %%: input register toggles %0d, dot product %0d",
               lvl * 12.5, in_toggles - t0, acc);
      if (lvl == 0) check(in_toggles - t0 == 0, "no operand toggles at 0 % activity");
      else check(in_toggles - t0 > prev_toggles, "toggles grow with activity");
      prev_toggles = in_toggles - t0;
    end
    check(out_toggles > 0, "output registers switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
