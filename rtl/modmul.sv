// modmul: modulo (2^n + 1) multiplier for IDEA, operand value 0 meaning 2^n.
//
// Two circuits see the operands at once. The main path handles non-zero
// operands: the partial product generator (one AND per bit, wrapped bits
// inverted) gives n rows, a constant row is added, a Wallace tree of modulo
// carry-save adders reduces the n + 1 rows to a sum and a carry vector, and
// the modulo carry-lookahead adder adds those two and reduces modulo 2^n + 1.
// The zero-case handler computes the product when an operand is zero. The
// output of each path is all zeros exactly when the other applies, so n OR
// gates select the result.
//
// The constant row. Row j of the matrix is worth y_j*X*2^j + (2^j - 1), so
// the rows together are X*Y + (2^n - 1 - n). Each of the n - 1 full-adder
// rows of the tree adds one through its inverted end-around carry, and the
// final adder adds one more. For the result to be X*Y the constant must be
//     K = -(2^n - 1 - n) - (n - 1) - 1 = -(2^n - 1) = 2   (mod 2^n + 1),
// the same for every n. With an operand zero the main path then computes
// 0 * Y = 0 and outputs all zeros, as the OR merge needs.
// The document names the constant row but not its value; the value above
// follows from this arithmetic and is checked by the testbench.
//
// Purely combinational; for n = 16 the critical path is 1 gate (matrix),
// 6 full-adder levels, the 2-level lookahead adder and the OR.
// Ports: x, y operands (0 = 2^n); p product (0 = 2^n). Requires n >= 2.
module modmul
  import modmul_pkg::*;
#(
  parameter int N = 16  // operand width n (16 for IDEA)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  localparam logic [N-1:0] K = N'(2);  // constant row, derived above

  logic [N-1:0] pp   [N];
  logic [N-1:0] rows [N+1];
  logic [N-1:0] sum_v, carry_v, main_p, zero_p;

  mod_ppg #(.N(N)) u_ppg (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  always_comb begin
    for (int j = 0; j < N; j++) rows[j] = pp[j];
    rows[N] = K;
  end

  mod_csa_tree #(.N(N), .ROWS(N + 1)) u_csa (
    .rows_i  (rows),
    .sum_o   (sum_v),
    .carry_o (carry_v)
  );

  mod_cla #(.N(N)) u_cla (
    .a (carry_v),
    .b (sum_v),
    .s (main_p)
  );

  zero_case_handler #(.N(N)) u_zero (
    .x (x),
    .y (y),
    .z (zero_p)
  );

  assign p = main_p | zero_p;

  initial assert (N >= 2) else $error("modmul needs N >= 2");

endmodule
