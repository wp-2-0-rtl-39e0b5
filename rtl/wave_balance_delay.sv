// wave_balance_delay: behavioural timing model of the balanced wave network.
// Not synthesizable: in silicon the timing it models comes from the gates of
// the combinational tree and the delay cells and side loads inserted to
// balance it (529 delay cells in the reference implementation).
//
// The combinational tree itself is written as zero-delay logic; this block
// sits on its output and gives it the timing that wave pipelining relies on.
// A wave launched at time t (a change of d) leaves the network output
// undisturbed until t + D_MIN_PS, the fastest path; from then on the output
// toggles (modelled as the new value with every bit inverted) until
// t + D_MAX_PS, the slowest path, when it settles to the new value. Because
// delays are transport delays, many waves can be inside the model at once
// when D_MAX_PS is several launch periods. If the next wave starts
// disturbing the output before the current one has settled (launch period
// shorter than D_MAX_PS - D_MIN_PS) the current wave never appears at q:
// that is the overlap that the launch-rate limit forbids.
//
// D_MIN_PS and D_MAX_PS include the launch clock insertion and clk-to-q
// delays and the hold and setup margins of the output registers, so the
// output registers can be treated as ideal. Defaults are taken from the slow
// corner of the reference implementation: at a 1.0 ns launch period the
// strobe latency must lie between 2.016 ns (setup) and 2.040 ns (hold), i.e.
// D_max + t_setup = 3.016 ns and D_min - t_hold = 2.040 ns.
module wave_balance_delay #(
  parameter int unsigned W        = 50,    // width of the wave bundle
  parameter int unsigned D_MIN_PS = 2040,  // shortest path, less hold margin
  parameter int unsigned D_MAX_PS = 3016   // longest path, plus setup margin
) (
  input  logic [W-1:0] d,  // zero-delay network output
  output logic [W-1:0] q   // network output with wave timing
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned launched;   // waves launched so far
  int unsigned disturbed;  // number of the last wave that reached q

  initial begin
    launched  = 0;
    disturbed = 0;
    q         = '0;
  end

  task automatic propagate(input logic [W-1:0] v, input int unsigned id);
    fork
      begin
        #(D_MIN_PS);
        disturbed = id;
        q = ~v;
      end
      begin
        #(D_MAX_PS);
        if (disturbed == id) q = v;
      end
    join_none
  endtask

  always @(d) begin
    launched = launched + 1;
    propagate(d, launched);
  end

endmodule
