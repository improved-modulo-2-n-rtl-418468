// zero_case_handler: product of the modulo (2^n + 1) multiplier when at least
// one operand is zero (zero stands for 2^n).
//
// The operands are bitwise NORed: if x is zero the result is ~y, if y is zero
// it is ~x, and if both are zero it is all ones. The special adder adds 2 to
// that value modulo 2^n, which gives 2^n + 1 - w for the non-zero operand w
// (and 1 for two zero operands, since 2^n * 2^n = 1 modulo 2^n + 1).
// x_or and y_or are the OR of all bits of each operand; their NAND is 1 when
// an operand is zero, and a row of AND gates passes the special adder's
// result only then. For two non-zero operands the output is all zeros, so
// the multiplier can merge it with its main path by OR gates.
//
// Purely combinational, and off the multiplier's critical path.
// Ports: x, y operands; z result (zero unless an operand is zero).
module zero_case_handler #(
  parameter int N = 16  // operand width n
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);

  logic [N-1:0] nor_xy;
  logic [N-1:0] sum;
  logic         x_or, y_or, sel;

  assign nor_xy = ~(x | y);
  assign x_or   = |x;
  assign y_or   = |y;
  assign sel    = ~(x_or & y_or);

  special_adder #(.N(N)) u_add (
    .v (nor_xy),
    .s (sum)
  );

  assign z = sum & {N{sel}};

endmodule
