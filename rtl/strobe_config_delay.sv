// strobe_config_delay: behavioural model of the field-configurable delay
// ("delay tune") on the clock strobe. Not synthesizable: in silicon this is a
// chain of delay cells with a tap multiplexer, built from library cells and
// placed by hand next to the output samplers.
//
// The clock strobe is a branch of the launch clock that runs alongside the
// data through the balanced network to clock the output registers. This
// block sets how late its edges arrive: every transition of strobe_in appears
// at strobe_out after
//     D_strobe = BASE_PS + sel * STEP_PS   picoseconds,
// where BASE_PS stands for the fixed latency of the strobe path (its share of
// the balanced network and the output clock tree) and STEP_PS for one delay
// cell. Delays are transport delays: several launch-clock edges can be in the
// line at once, as they are in silicon when D_strobe exceeds the launch
// period. The delay of an edge is fixed by sel at the moment it enters the
// line; change sel only while the launch clock is stopped and the line is
// empty, which an assertion checks.
//
// Being able to move D_strobe after fabrication is what lets both setup and
// hold failures of a given die be fixed in the field. The tap count, BASE_PS
// and STEP_PS are this model's choices; the defaults span 1.2 ns to 3.1 ns in
// 15 ps steps, covering the strobe latencies swept for the slow corner of the
// reference implementation (about 1.25 ns to 3.0 ns) finely enough to land
// inside its 24 ps wide window at a 1 ns launch period.
module strobe_config_delay #(
  parameter int unsigned SEL_W   = 7,     // delay select width (2^SEL_W taps)
  parameter int unsigned BASE_PS = 1200,  // latency at sel = 0
  parameter int unsigned STEP_PS = 15     // added latency per tap
) (
  input  logic             strobe_in,   // clock strobe from the launch clock
  input  logic [SEL_W-1:0] sel,         // field configuration: tap select
  output logic             strobe_out   // delayed strobe to the output samplers
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned pending;  // edges inside the line

  initial begin
    strobe_out = 1'b0;
    pending    = 0;
  end

  task automatic pass_edge(input logic level, input int unsigned dly);
    pending = pending + 1;
    fork
      begin
        #(dly) strobe_out = level;
        pending = pending - 1;
      end
    join_none
  endtask

  // The setting may only change while the line is empty.
  always @(sel) begin
    assert (pending == 0)
      else $error("strobe delay setting changed with %0d edges in the line", pending);
  end

  always @(strobe_in) pass_edge(strobe_in, BASE_PS + int'(sel) * STEP_PS);

endmodule
