// wp_pkg: sizes and types shared by the clock-less wave-propagated (CWPP)
// dot-product unit.
//
// One "wave" is the set of operands launched on one edge of the launch
// clock: N_PAIRS pairs of DATA_W-bit numbers (8 pairs of 8 bits, 128 input
// register bits). The combinational tree reduces the wave to a carry-save
// pair of CS_W-bit words (2 x 24 = 48 output register bits). A vector of up
// to MAX_ELEMS elements (1024) is accumulated over successive waves.
//
// The pair counts, operand width, element count and the 128/48 register
// counts follow the source design. Splitting the 48 output bits into a
// 24-bit sum and a 24-bit carry word, the unsigned operands and the two tag
// bits (valid, start-of-vector) that travel with each wave are choices of
// this implementation.
package wp_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_PAIRS   = 8;     // operand pairs per wave
  localparam int unsigned DATA_W    = 8;     // operand width
  localparam int unsigned MAX_ELEMS = 1024;  // longest vector accumulated
  localparam int unsigned OUT_REGS  = 48;    // output sampling registers
  localparam int unsigned CS_W      = OUT_REGS / 2;  // sum / carry word width
  // One product needs 2*DATA_W bits; MAX_ELEMS of them need log2(MAX_ELEMS) more.
  localparam int unsigned ACC_W     = 2 * DATA_W + $clog2(MAX_ELEMS);
  localparam int unsigned CNT_W     = $clog2(MAX_ELEMS) + 1;

  // Operands of one wave: [pair][bit].
  typedef logic [N_PAIRS-1:0][DATA_W-1:0] opvec_t;

  // Tag carried alongside each wave through the balanced network.
  typedef struct packed {
    logic vld;  // the wave holds operands to accumulate
    logic sof;  // the wave is the first one of a new vector
  } wave_tag_t;

  // A wave as launched by the input sampler.
  typedef struct packed {
    wave_tag_t tag;
    opvec_t    a;
    opvec_t    b;
  } wave_in_t;

  // A wave as it leaves the Wallace tree and is sampled at the output.
  typedef struct packed {
    wave_tag_t         tag;
    logic [CS_W-1:0]   sum;
    logic [CS_W-1:0]   carry;
  } wave_out_t;

endpackage
