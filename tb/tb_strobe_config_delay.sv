// tb_strobe_config_delay: self-checking test of the configurable strobe delay
// model.
//
// For every tap setting it runs a 1 ns launch clock and checks that each
// rising and falling edge reappears at strobe_out exactly 1200 + 15 * sel ps
// later, including settings where several clock edges are inside the delay
// line at once.
module tb_strobe_config_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned BASE = 1200;
  localparam int unsigned STEP = 15;
  localparam int unsigned T    = 1000;

  logic       clk = 1'b0;
  logic [6:0] sel = '0;
  logic       strobe_out;
  int checks = 0;
  int failures = 0;
  int in_flight_max = 0;

  time edges_in [$];
  int unsigned expected_dly;

  strobe_config_delay dut (.strobe_in(clk), .sel(sel), .strobe_out(strobe_out));

  always @(clk) edges_in.push_back($time);

  bit monitor_on = 1'b0;

  always @(strobe_out) begin
    time t0;
    if (monitor_on) checks++;
    if (!monitor_on) begin
      // Initialisation at time zero, not a clock edge.
    end else if (edges_in.size() == 0) begin
      failures++;
    end else begin
      if (edges_in.size() > in_flight_max) in_flight_max = edges_in.size();
      t0 = edges_in.pop_front();
      if ($time - t0 != time'(expected_dly)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d delay=%0t exp=%0d", sel, $time - t0, expected_dly);
      end
    end
  end

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    edges_in.delete();
    monitor_on = 1'b1;
    for (int s = 0; s < 128; s++) begin
      sel = 7'(s);
      expected_dly = BASE + STEP * s;
      repeat (6) begin
        clk = 1'b1;
        #(T / 2);
        clk = 1'b0;
        #(T / 2);
      end
      // Let the line empty before the setting changes.
      #5000;
      checks++;
      if (edges_in.size() != 0) failures++;
    end
    checks++;
    if (in_flight_max < 4) begin
      failures++;
      $display("FAIL never had several edges in the line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
