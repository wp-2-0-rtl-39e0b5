// dp_wallace_tree: fused dot-product Wallace tree, the combinational network
// through which the waves propagate.
//
// It computes sum_{i} a[i] * b[i] over N_PAIRS unsigned DATA_W-bit pairs in a
// single carry-save tree: every product contributes DATA_W partial-product
// rows (a[i] gated by one bit of b[i], shifted by that bit's weight), and all
// N_PAIRS*DATA_W rows (64 at the default sizes) are reduced together, three
// rows to two per level, by full-adder (3:2) layers until two rows remain.
// Because the products are never formed separately, multiplication and
// summation are fused. The two remaining rows are the outputs sum and carry:
// sum + carry (mod 2^CS_W) is the dot product. The final carry-propagate
// addition is left to the accumulator, so the network's output is exactly the
// 2*CS_W bits that the output sampling registers capture.
//
// Timing: purely combinational, no clock. The tree has no feedback, which is
// what lets several waves be in flight in it at once once its paths are
// delay-balanced. Row-wise 3:2 reduction and the carry-save output are this
// implementation's reading of "Wallace tree"; the source design gives the
// function and the register counts, not the gate netlist.
module dp_wallace_tree
  import wp_pkg::*;
#(
  parameter int unsigned NP = N_PAIRS,  // operand pairs
  parameter int unsigned DW = DATA_W,   // operand width
  parameter int unsigned OW = CS_W      // width of the sum and carry rows
) (
  input  logic [NP-1:0][DW-1:0] a,
  input  logic [NP-1:0][DW-1:0] b,
  output logic [OW-1:0]         sum,
  output logic [OW-1:0]         carry
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NROWS = NP * DW;

  // Rows left after each 3:2 level: each full group of three becomes two,
  // the one or two rows left over pass through.
  function automatic int unsigned rows_after(int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  function automatic int unsigned num_levels(int unsigned n);
    int unsigned l = 0;
    while (n > 2) begin
      n = rows_after(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels(NROWS);

  // lvl[l] holds the rows entering level l; lvl[NLEV] the final two rows.
  logic [OW-1:0] lvl [NLEV+1][NROWS];

  always_comb begin
    int unsigned n, g;
    logic [OW-1:0] x, y, z;
    lvl = '{default: '0};
    // Partial products: row p*DW+j is a[p] weighted by bit j of b[p].
    for (int p = 0; p < int'(NP); p++) begin
      for (int j = 0; j < int'(DW); j++) begin
        lvl[0][p*DW+j] = b[p][j] ? (OW'(a[p]) << j) : '0;
      end
    end
    // 3:2 carry-save levels.
    n = NROWS;
    for (int l = 0; l < int'(NLEV); l++) begin
      g = n / 3;
      for (int i = 0; i < int'(NROWS / 3); i++) begin
        if (i < int'(g)) begin
          x = lvl[l][3*i];
          y = lvl[l][3*i+1];
          z = lvl[l][3*i+2];
          lvl[l+1][2*i]   = x ^ y ^ z;
          lvl[l+1][2*i+1] = ((x & y) | (x & z) | (y & z)) << 1;
        end
      end
      for (int k = 0; k < 2; k++) begin
        if (k < int'(n % 3)) begin
          lvl[l+1][2*g+k] = lvl[l][3*g+k];
        end
      end
      n = rows_after(n);
    end
  end

  assign sum   = lvl[NLEV][0];
  assign carry = lvl[NLEV][1];

endmodule
