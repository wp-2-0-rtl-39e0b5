// tb_dp_out_sampler: self-checking test of the output sampling registers.
//
// Drives random carry-save results and tags, clocks strobe_out with a 1 ns
// period, and checks that each rising edge captures the value present just
// before it, that the value holds between edges, and that the asynchronous
// reset clears the tag.
module tb_dp_out_sampler;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic      clk = 1'b0;
  logic      rst_n = 1'b1;
  wave_out_t d = '0;
  wave_out_t q;
  int checks = 0;
  int failures = 0;

  dp_out_sampler dut (.strobe_out(clk), .rst_n(rst_n), .d(d), .q(q));

  always #500 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wave_out_t exp;
    #1;
    rst_n = 1'b0;
    #1;
    check(q.tag == '0, "tag cleared in reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      d.sum   = CS_W'($urandom);
      d.carry = CS_W'($urandom);
      d.tag   = wave_tag_t'($urandom);
      exp = d;
      @(posedge clk);
      #1;
      check(q == exp, "result sampled on strobe edge");
      d = ~d;
      #300;
      check(q == exp, "result held between edges");
      if (t % 500 == 250) begin
        rst_n = 1'b0;
        #1;
        check(q.tag == '0, "asynchronous reset clears tag");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
