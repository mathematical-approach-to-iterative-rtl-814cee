// poly_muldiv: S(t) = A(t) X(t) / B(t) in a single network.
//
// A and B are fixed polynomials of degree C with b_C invertible; X is
// streamed most significant first. Merging the multiplication network with
// the division network gives
//
//     S = b_C^-1 { a_C X + sum_{i=1..C} Z^-i [ a_(C-i) X - b_(C-i) S ] }
//
// Stage k (k = 0 .. C-1) adds a_k x - b_k s to the delayed output of stage
// k-1 (zero for stage 0) and feeds a Z unit. The last stage adds a_C x to
// the last Z unit and multiplies by the inverse of b_C, giving s, which is
// fed back to the first C stages; every loop passes through a Z unit.
//
// Timing: after clearing, x_j (j = m down to 0) enters in cycle m-j and s_j
// appears in the same cycle. If B divides A X, the delay units hold zero
// after x_0; otherwise they hold the remainder of A X divided by B
// (rem[k] = r_k) and s is the quotient. Further zero inputs continue the
// expansion of A X / B in falling powers of t.
//
// Arithmetic is modulo 2**W, a choice of this design: b_C must be odd and
// b_inv its inverse modulo 2**W. b[C] is used only by the assertion.
module poly_muldiv #(
  parameter int unsigned C = icn_pkg::POLY_DEG,
  parameter int unsigned W = icn_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] a [C+1],
  input  logic [W-1:0] b [C+1],   // b[C] odd
  input  logic [W-1:0] b_inv,     // inverse of b[C] modulo 2**W
  input  logic [W-1:0] x,
  output logic [W-1:0] s,
  output logic [W-1:0] rem [C],
  output logic         rem_zero
);

  logic [W-1:0] p [C];
  logic [W-1:0] z [C+1];

  assign z[0] = '0;

  for (genvar k = 1; k <= C; k++) begin : g_z
    z_delay #(.W(W)) u_z (
      .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(p[k-1]), .q(z[k])
    );
  end

  always_comb begin
    s = b_inv * (z[C] + a[C] * x);
    for (int k = 0; k < int'(C); k++) begin
      p[k] = z[k] + a[k] * x - b[k] * s;
    end
  end

  always_comb begin
    rem_zero = 1'b1;
    for (int k = 0; k < int'(C); k++) begin
      rem[k] = z[k+1];
      if (z[k+1] != '0) rem_zero = 1'b0;
    end
  end

  b_inv_ok : assert property (@(posedge clk) disable iff (!rst_n)
    en |-> W'(b[C] * b_inv) == W'(1));

endmodule
