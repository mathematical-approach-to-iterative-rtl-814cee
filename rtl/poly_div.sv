// poly_div: divides a streamed polynomial Y(t) by a fixed polynomial A(t).
//
// Y has degree m+C and A has degree C; the quotient X (degree m) and the
// remainder R = Y - A X (degree below C) are computed. Division has to start
// from the most significant coefficient, so Y is streamed with y_(m+C)
// first. Solving the most-significant-first multiplication for X gives
//
//     X = a_C^-1 sum_{i=1..C} Z^-i [ -a_(C-i) X + eps_(i,C) Y ]
//
// where eps_(C,C) = 1 and 0 otherwise, i.e. Y enters at the left end. The
// network is C stages; stage k (k = 0 .. C-1) adds -a_k x to the delayed
// output of stage k-1 (to y for stage 0) and feeds a Z unit. The last Z unit,
// multiplied by the inverse of a_C, is the quotient coefficient x, which is
// fed back to all stages. The loop always passes through a Z unit.
//
// Timing: after the delay units are cleared, y_j enters in cycle m+C-j. For
// the first C cycles x is zero and is not a quotient coefficient; from then
// on x_j appears in the same cycle as y_j, for j = m down to 0. After y_0 has
// been clocked in, the delay units hold the remainder: rem[k] = r_k. They
// are all zero exactly when A divides Y; rem_zero flags that.
//
// Arithmetic is modulo 2**W, a choice of this design: a_C must then be odd,
// and a_inv must be its inverse modulo 2**W (icn_pkg::inv_mod2w). With these,
// quotient and remainder are exact. a[C] itself is used only by the
// assertion that checks a_inv.
module poly_div #(
  parameter int unsigned C = icn_pkg::POLY_DEG,
  parameter int unsigned W = icn_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] a [C+1],   // a[i] = a_i, a[C] odd
  input  logic [W-1:0] a_inv,     // inverse of a[C] modulo 2**W
  input  logic [W-1:0] y,         // dividend, most significant first
  output logic [W-1:0] x,         // quotient, most significant first
  output logic [W-1:0] rem [C],   // rem[k] = remainder coefficient r_k
  output logic         rem_zero
);

  logic [W-1:0] p [C];       // adder output of stage k
  logic [W-1:0] z [C+1];     // z[k+1]: Z unit after stage k; z[0] unused

  assign z[0] = y;

  for (genvar k = 1; k <= C; k++) begin : g_z
    z_delay #(.W(W)) u_z (
      .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(p[k-1]), .q(z[k])
    );
  end

  always_comb begin
    x = a_inv * z[C];
    for (int k = 0; k < int'(C); k++) begin
      p[k] = z[k] - a[k] * x;
    end
  end

  always_comb begin
    rem_zero = 1'b1;
    for (int k = 0; k < int'(C); k++) begin
      rem[k] = z[k+1];
      if (z[k+1] != '0) rem_zero = 1'b0;
    end
  end

  // The leading coefficient must be invertible and a_inv its inverse.
  a_inv_ok : assert property (@(posedge clk) disable iff (!rst_n)
    en |-> W'(a[C] * a_inv) == W'(1));

endmodule
