// dp_in_sampler: input sampling registers of the wave-propagated dot-product
// unit.
//
// On every rising edge of strobe_in (the launch clock) it captures the
// operands a and b of one wave (N_PAIRS x DATA_W bits each, 128 bits in all
// at the default sizes) together with the wave's tag, and drives them into
// the balanced combinational network. A new wave is launched on every edge;
// nothing inside the network is clocked, so the launch period is bounded only
// by the skew of the network, not by its delay.
//
// Timing: one register stage, output valid one clk-to-q after the edge.
// rst_n is an asynchronous active-low reset that clears the tag so no stale
// wave is accumulated after reset; the operand bits are not reset, as in a
// plain datapath register. The reset is this implementation's choice.
module dp_in_sampler
  import wp_pkg::*;
(
  input  logic      strobe_in,  // launch clock
  input  logic      rst_n,      // asynchronous, active low
  input  opvec_t    a,          // operand vector a of this wave
  input  opvec_t    b,          // operand vector b of this wave
  input  wave_tag_t tag,        // valid / start-of-vector of this wave
  output wave_in_t  wave        // launched wave
);
  timeunit 1ps;
  timeprecision 1ps;

  wave_tag_t tag_q;
  opvec_t    a_q, b_q;

  always_ff @(posedge strobe_in or negedge rst_n) begin
    if (!rst_n) begin
      tag_q <= '0;
    end else begin
      tag_q <= tag;
    end
  end

  always_ff @(posedge strobe_in) begin
    a_q <= a;
    b_q <= b;
  end

  assign wave = '{tag: tag_q, a: a_q, b: b_q};

endmodule
