// dp_accumulator: result accumulator behind the output sampling registers.
//
// On every rising edge of strobe_out it takes the carry-save result of one
// wave from the output sampler, resolves it with one carry-propagate
// addition (sum + carry) and adds it to the running dot product. A wave whose
// tag has sof set starts a new vector: the accumulator is loaded with that
// wave's value instead of adding to it. Waves with vld clear are skipped.
// elems counts the elements (N_PAIRS per wave) in the current vector, so a
// vector of MAX_ELEMS (1024) elements ends with elems = 1024.
//
// Timing: one register stage on strobe_out, so a wave captured by the output
// sampler on one strobe edge is in acc after the next. ACC_W = 2*DATA_W +
// log2(MAX_ELEMS) bits hold the largest unsigned result of a full vector
// without overflow; longer vectors wrap modulo 2^ACC_W. The reset
// (asynchronous, active low) and the sof/vld control are this
// implementation's choices; the source design names the accumulator and the
// 1024-element vector length only.
module dp_accumulator
  import wp_pkg::*;
#(
  parameter int unsigned AW = ACC_W,  // accumulator width
  parameter int unsigned CW = CNT_W   // element counter width
) (
  input  logic          strobe_out,  // delayed clock strobe
  input  logic          rst_n,       // asynchronous, active low
  input  wave_out_t     d,           // sampled wave from the output sampler
  output logic [AW-1:0] acc,         // running dot product
  output logic [CW-1:0] elems        // elements accumulated so far
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [CS_W-1:0] wave_val;
  logic [AW-1:0]   wave_ext;

  // Carry-propagate addition of the carry-save pair; the dot product of one
  // wave fits in CS_W bits, so the sum is taken modulo 2^CS_W.
  assign wave_val = d.sum + d.carry;
  assign wave_ext = AW'(wave_val);

  always_ff @(posedge strobe_out or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      elems <= '0;
    end else if (d.tag.vld) begin
      if (d.tag.sof) begin
        acc   <= wave_ext;
        elems <= CW'(N_PAIRS);
      end else begin
        acc   <= acc + wave_ext;
        elems <= elems + CW'(N_PAIRS);
      end
    end
  end

endmodule
