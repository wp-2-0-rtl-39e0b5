// tb_dp_in_sampler: self-checking test of the input sampling registers.
//
// Drives random operands and tags between clock edges and checks that each
// rising edge of strobe_in (1 ns period) launches exactly the values present
// before it, that the outputs hold between edges, and that the asynchronous
// reset clears the tag at once without a clock edge.
module tb_dp_in_sampler;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic      clk = 1'b0;
  logic      rst_n = 1'b1;
  opvec_t    a = '0, b = '0;
  wave_tag_t tag = '0;
  wave_in_t  wave;
  int checks = 0;
  int failures = 0;

  dp_in_sampler dut (.strobe_in(clk), .rst_n(rst_n), .a(a), .b(b), .tag(tag), .wave(wave));

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
    wave_in_t exp;
    #1;
    rst_n = 1'b0;
    #1;
    check(wave.tag == '0, "tag cleared in reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int p = 0; p < int'(N_PAIRS); p++) begin
        a[p] = DATA_W'($urandom);
        b[p] = DATA_W'($urandom);
      end
      tag = wave_tag_t'($urandom);
      exp = '{tag: tag, a: a, b: b};
      @(posedge clk);
      #1;
      check(wave == exp, "wave launched on edge");
      // Change the inputs mid-period: the launched wave must not follow.
      a = ~a;
      b = ~b;
      #200;
      check(wave == exp, "wave held between edges");
      if (t % 500 == 250) begin
        tag = '1;
        rst_n = 1'b0;
        #1;
        check(wave.tag == '0, "asynchronous reset clears tag");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
