// tb_dp_wallace_tree: self-checking test of the fused dot-product tree.
//
// Applies corner vectors (all zero, all ones, single pairs, single bits) and
// random operand vectors, and checks that sum + carry (mod 2^CS_W) equals
// the dot product computed here directly as sum of a[i]*b[i]. Also checks
// that the carry row's least significant bit is zero, as every carry of a
// 3:2 layer is shifted one place up.
module tb_dp_wallace_tree;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  opvec_t          a, b;
  logic [CS_W-1:0] sum, carry;
  int checks = 0;
  int failures = 0;

  dp_wallace_tree dut (.a(a), .b(b), .sum(sum), .carry(carry));

  function automatic logic [CS_W-1:0] ref_dot(opvec_t x, opvec_t y);
    int unsigned r = 0;
    for (int i = 0; i < int'(N_PAIRS); i++) r += int'(x[i]) * int'(y[i]);
    return CS_W'(r);
  endfunction

  task automatic apply(opvec_t x, opvec_t y);
    logic [CS_W-1:0] got;
    a = x;
    b = y;
    #10;
    got = sum + carry;
    checks++;
    if (got !== ref_dot(x, y)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%0d exp=%0d", x, y, got, ref_dot(x, y));
    end
    checks++;
    if (carry[0] !== 1'b0) failures++;
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opvec_t x, y;
    apply('0, '0);
    apply('1, '1);
    for (int p = 0; p < int'(N_PAIRS); p++) begin
      x = '0; y = '0;
      x[p] = 8'hFF; y[p] = 8'hFF;
      apply(x, y);
      for (int j = 0; j < int'(DATA_W); j++) begin
        x = '0; y = '0;
        x[p] = 8'hFF; y[p][j] = 1'b1;
        apply(x, y);
        x = '0; x[p][j] = 1'b1; y[p] = 8'hA5;
        apply(x, y);
      end
    end
    for (int t = 0; t < 5000; t++) begin
      for (int p = 0; p < int'(N_PAIRS); p++) begin
        x[p] = DATA_W'($urandom);
        y[p] = DATA_W'($urandom);
      end
      apply(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
