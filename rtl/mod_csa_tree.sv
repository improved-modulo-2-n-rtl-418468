// mod_csa_tree: Wallace tree of modulo (2^n + 1) carry-save adders.
//
// The tree reduces ROWS n-bit rows to a sum vector and a carry vector. At
// every level the rows are taken three at a time; each triple goes through
// one row of n full adders, whose carry out of the top bit (weight 2^n) is
// inverted and placed at bit 0 of the carry vector (the end-around carry of
// arithmetic modulo 2^n + 1). Rows left over at a level pass unchanged to the
// next. Because -c = ~c - 1, every full-adder row adds exactly one to the
// value it carries, so
//     sum + carry = (sum of all rows) + (ROWS - 2)   (mod 2^n + 1).
// The caller accounts for that offset. The depth is csa_levels(ROWS), which
// for n = 16 with the constant row (17 rows) is 6 full-adder levels.
// The tree shape and the inverted end-around carry follow the published
// structure; which rows form a triple and where leftovers go is this
// design's choice.
//
// Purely combinational. Ports: rows_i input rows; sum_o, carry_o outputs.
module mod_csa_tree
  import modmul_pkg::*;
#(
  parameter int N    = 16,  // row width n
  parameter int ROWS = 17   // number of input rows (n partial products + constant)
) (
  input  logic [N-1:0] rows_i [ROWS],
  output logic [N-1:0] sum_o,
  output logic [N-1:0] carry_o
);

  localparam int LEVELS = csa_levels(ROWS);

  // Level l reads in_r (only the first csa_rows(ROWS, l) entries are used)
  // and writes out_r, which is the next level's in_r; unused entries are 0.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int R = csa_rows(ROWS, l);
    localparam int T = R / 3;
    logic [N-1:0] in_r  [ROWS];
    logic [N-1:0] out_r [ROWS];
    if (l == 0) begin : g_first
      assign in_r = rows_i;
    end else begin : g_next
      assign in_r = g_lvl[l-1].out_r;
    end
    for (genvar t = 0; t < T; t++) begin : g_csa
      logic [N-1:0] a, b, c, maj;
      assign a   = in_r[3*t];
      assign b   = in_r[3*t+1];
      assign c   = in_r[3*t+2];
      assign maj = (a & b) | (a & c) | (b & c);
      assign out_r[2*t]   = a ^ b ^ c;
      assign out_r[2*t+1] = {maj[N-2:0], ~maj[N-1]};
    end
    for (genvar k = 3 * T; k < R; k++) begin : g_pass
      assign out_r[k - T] = in_r[k];
    end
    for (genvar k = R - T; k < ROWS; k++) begin : g_unused
      assign out_r[k] = '0;
    end
  end

  if (LEVELS == 0) begin : g_no_tree
    assign sum_o   = rows_i[0];
    assign carry_o = (ROWS > 1) ? rows_i[ROWS-1] : '0;
  end else begin : g_tree
    assign sum_o   = g_lvl[LEVELS-1].out_r[0];
    assign carry_o = g_lvl[LEVELS-1].out_r[1];
  end

endmodule
