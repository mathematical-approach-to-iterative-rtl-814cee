// poly_sop_comb: sum of two polynomial products, W(t) = A(t) X(t) + B(t) Y(t),
// in one combined chain.
//
// Because the Z operator distributes over addition, the two chains of
// poly_sop can share their delay units:
//
//     Z^-C W = sum_{j=0..C} Z^-j [ a_(C-j) X + b_(C-j) Y ]
//
// Stage k (k = 0 .. C, left to right) adds a_k x + b_k y to the delayed
// output of stage k-1 (zero for stage 0); the last stage gives w. Only C
// delay units are needed. Coefficients of X and Y arrive one pair per cycle,
// most significant first, and w_(n+C) appears in the same cycle as x_n and
// y_n. Arithmetic is modulo 2**W.
module poly_sop_comb #(
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
  output logic [W-1:0] w
);

  logic [W-1:0] p [C+1];
  logic [W-1:0] z [C+1];

  assign z[0] = '0;

  for (genvar k = 1; k <= C; k++) begin : g_z
    z_delay #(.W(W)) u_z (
      .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(p[k-1]), .q(z[k])
    );
  end

  always_comb begin
    for (int k = 0; k <= int'(C); k++) begin
      p[k] = z[k] + a[k] * x + b[k] * y;
    end
  end

  assign w = p[C];

endmodule
