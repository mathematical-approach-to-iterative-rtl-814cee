// poly_sop: sum of two polynomial products, W(t) = A(t) X(t) + B(t) Y(t),
// built from two separate multiplier chains.
//
// A and B have degree C and are fixed; the coefficients of X and Y arrive
// together, one pair per cycle, most significant first. Each product is
// formed by its own poly_mul chain in most-significant-first order, and one
// more adder joins the two chain outputs:
//
//     Z^-C W = sum_j Z^-j a_(C-j) X + sum_j Z^-j b_(C-j) Y
//
// so w_(n+C) appears in the same cycle as x_n and y_n. This arrangement
// needs 2C delay units; poly_sop_comb computes the same with C. Arithmetic
// is modulo 2**W. Control (en, clr) is shared by both chains.
module poly_sop #(
  parameter int unsigned C = icn_pkg::POLY_DEG,
  parameter int unsigned W = icn_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] a [C+1],
  input  logic [W-1:0] b [C+1],
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] w      // coefficient w_(n+C)
);

  logic [W-1:0] ax, by;

  poly_mul #(.C(C), .W(W)) u_ax (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .msb_first(1'b1),
    .a(a), .x(x), .y(ax)
  );

  poly_mul #(.C(C), .W(W)) u_by (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .msb_first(1'b1),
    .a(b), .x(y), .y(by)
  );

  assign w = ax + by;

endmodule
