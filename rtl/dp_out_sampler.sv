// dp_out_sampler: output sampling registers of the wave-propagated
// dot-product unit.
//
// Clocked by strobe_out, the clock strobe: a copy of the launch clock that
// has travelled through the balanced network and the field-configurable
// delay, so that its edge arrives while the wave it is meant to capture is
// stable at the network output. It captures the carry-save result of one
// wave (2 x CS_W = 48 bits) and the wave's tag.
//
// Timing: one register stage on strobe_out. Correct capture needs the
// strobe edge inside the wave's valid window: no earlier than D_max + t_setup
// after the wave's launch and before the next wave disturbs the output,
// D_min - t_hold after the next launch edge. rst_n (asynchronous, active low)
// clears the tag; this reset is the implementation's choice.
module dp_out_sampler
  import wp_pkg::*;
(
  input  logic      strobe_out,  // delayed clock strobe
  input  logic      rst_n,       // asynchronous, active low
  input  wave_out_t d,           // network output
  output wave_out_t q            // sampled wave
);
  timeunit 1ps;
  timeprecision 1ps;

  wave_tag_t       tag_q;
  logic [CS_W-1:0] sum_q, carry_q;

  always_ff @(posedge strobe_out or negedge rst_n) begin
    if (!rst_n) begin
      tag_q <= '0;
    end else begin
      tag_q <= d.tag;
    end
  end

  always_ff @(posedge strobe_out) begin
    sum_q   <= d.sum;
    carry_q <= d.carry;
  end

  assign q = '{tag: tag_q, sum: sum_q, carry: carry_q};

endmodule
