// tb_wave_balance_delay: self-checking test of the balanced-network timing
// model.
//
// Launches a new random wave every 1 ns and probes the output just before
// D_min (previous wave still stable), just after D_min (output disturbed)
// and just after D_max (new wave settled). Then launches every 0.9 ns, below
// the limit D_max - D_min = 976 ps, and checks that no wave ever settles:
// consecutive waves overlap.
module tb_wave_balance_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W     = 50;
  localparam int unsigned D_MIN = 2040;
  localparam int unsigned D_MAX = 3016;

  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  int checks = 0;
  int failures = 0;

  wave_balance_delay #(.W(W), .D_MIN_PS(D_MIN), .D_MAX_PS(D_MAX)) dut (.d(d), .q(q));

  logic [W-1:0] hist [$];  // launched values, in order
  time          t_hist [$];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Probe each launched wave at three points of its journey.
  task automatic probe(int k, logic [W-1:0] prev, logic [W-1:0] v);
    fork
      begin
        #(D_MIN - 1);
        check(q == prev, "previous wave stable before D_min");
        #2;
        check(q == ~v, "output disturbed after D_min");
        #(D_MAX - D_MIN);
        check(q == v, "wave settled after D_max");
      end
    join_none
  endtask

  initial begin
    logic [W-1:0] prev, v;
    // Let the reset value of d settle first.
    #(D_MAX + 10);
    prev = '0;
    for (int k = 0; k < 200; k++) begin
      v = {$urandom, $urandom};
      d = v;
      probe(k, prev, v);
      prev = v;
      #1000;
    end
    #5000;
    // Launch period shorter than D_max - D_min: no wave may settle.
    for (int k = 0; k < 200; k++) begin
      v = {$urandom, $urandom};
      d = v;
      hist.push_back(v);
      #900;
    end
    #5000;
    checks++;
    if (q != hist[$]) failures++;  // the last one settles, nothing follows it
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // During the overlapped phase the output must never show a launched wave
  // other than the last one.
  always @(q) begin
    if (hist.size() > 1 && hist.size() < 200) begin
      for (int i = 0; i < hist.size() - 1; i++) begin
        if (q == hist[i]) begin
          failures++;
          $display("FAIL overlapped wave %0d became visible", i);
        end
      end
    end
  end

endmodule
