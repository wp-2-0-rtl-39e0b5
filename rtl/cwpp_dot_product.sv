// cwpp_dot_product: accumulated dot-product unit built as a clock-less
// wave-propagated pipeline (CWPP).
//
// Each edge of clk_in launches one wave: eight pairs of 8-bit operands are
// captured by the input sampler and enter a fused dot-product Wallace tree
// that holds no registers at all. The tree is delay-balanced, so every path
// from input to output takes nearly the same time; a new wave can therefore
// be launched long before the previous one has reached the output, as long
// as the launch period exceeds the spread between the slowest and fastest
// path (plus setup and hold). The output sampler is not clocked by clk_in
// directly but by the clock strobe: a branch of clk_in that travels with the
// data and passes a field-configurable delay, so that each strobe edge
// arrives while one wave is stable at the tree output. The accumulator,
// clocked by the same strobe, sums successive waves into the dot product of
// vectors of up to 1024 elements (128 waves).
//
//   clk_in --> dp_in_sampler --> dp_wallace_tree --> wave_balance_delay --+
//     |                                                                  v
//     +--> strobe_config_delay --> strobe_out --> dp_out_sampler --> dp_accumulator
//
// Interface: a, b, vld and sof are sampled on each rising clk_in edge
// (vld: the wave carries data; sof: it is the first wave of a new vector).
// acc and elems change on strobe_out, two strobe edges after the wave was
// captured by the output sampler. dly_sel picks the strobe latency D_strobe;
// operation is correct when
//     D_max - t_launch <= D_strobe < D_min
// (D_max and D_min include the setup and hold margins), in which case the
// strobe edge caused by launch k+1 samples wave k. Longer settings with
// D_max <= D_strobe < D_min + t_launch also work, the strobe edge of the same
// launch then sampling the wave one period earlier; the tags keep the result
// right either way. Change dly_sel only while clk_in is stopped.
//
// The two blocks with delays (wave_balance_delay, strobe_config_delay) are
// behavioural models of physical timing and are ignored by synthesis; in a
// zero-delay simulation without them the strobe would sample the wrong wave.
// Their parameters describe one process corner. The structure, the operand
// sizes, the 128 input and 48 output register bits and the 1024-element
// vectors follow the source design; the tag bits carried with each wave, the
// reset and the delay line granularity are this implementation's choices.
module cwpp_dot_product
  import wp_pkg::*;
#(
  parameter int unsigned D_MIN_PS    = 2040,  // network min delay - t_hold
  parameter int unsigned D_MAX_PS    = 3016,  // network max delay + t_setup
  parameter int unsigned DLY_SEL_W   = 7,     // strobe delay select width
  parameter int unsigned DLY_BASE_PS = 1200,  // strobe latency at dly_sel = 0
  parameter int unsigned DLY_STEP_PS = 15     // strobe latency per tap
) (
  input  logic                 clk_in,      // launch clock
  input  logic                 rst_n,       // asynchronous, active low
  input  logic                 vld,         // this wave carries operands
  input  logic                 sof,         // first wave of a new vector
  input  opvec_t               a,           // operand vector a (8 x 8 bit)
  input  opvec_t               b,           // operand vector b (8 x 8 bit)
  input  logic [DLY_SEL_W-1:0] dly_sel,     // clock strobe delay setting
  output logic                 strobe_out,  // clock strobe at the output side
  output logic [ACC_W-1:0]     acc,         // accumulated dot product
  output logic [CNT_W-1:0]     elems        // elements in acc
);
  timeunit 1ps;
  timeprecision 1ps;

  wave_in_t  wave_in;
  wave_out_t tree_out;
  wave_out_t net_out;
  wave_out_t sampled;

  dp_in_sampler u_in_sampler (
    .strobe_in (clk_in),
    .rst_n     (rst_n),
    .a         (a),
    .b         (b),
    .tag       ('{vld: vld, sof: sof}),
    .wave      (wave_in)
  );

  // Zero-delay function of the wave network.
  dp_wallace_tree u_tree (
    .a     (wave_in.a),
    .b     (wave_in.b),
    .sum   (tree_out.sum),
    .carry (tree_out.carry)
  );
  // The tag bits are plain wires through the network, balanced with the data.
  assign tree_out.tag = wave_in.tag;

  // Timing of the balanced network.
  wave_balance_delay #(
    .W        ($bits(wave_out_t)),
    .D_MIN_PS (D_MIN_PS),
    .D_MAX_PS (D_MAX_PS)
  ) u_balance (
    .d (tree_out),
    .q (net_out)
  );

  // Clock strobe: a branch of the launch clock through the configurable delay.
  strobe_config_delay #(
    .SEL_W   (DLY_SEL_W),
    .BASE_PS (DLY_BASE_PS),
    .STEP_PS (DLY_STEP_PS)
  ) u_strobe_delay (
    .strobe_in  (clk_in),
    .sel        (dly_sel),
    .strobe_out (strobe_out)
  );

  dp_out_sampler u_out_sampler (
    .strobe_out (strobe_out),
    .rst_n      (rst_n),
    .d          (net_out),
    .q          (sampled)
  );

  dp_accumulator u_acc (
    .strobe_out (strobe_out),
    .rst_n      (rst_n),
    .d          (sampled),
    .acc        (acc),
    .elems      (elems)
  );

endmodule
