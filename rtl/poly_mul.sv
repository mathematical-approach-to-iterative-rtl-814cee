// poly_mul: multiplies a streamed polynomial X(t) by a fixed polynomial A(t).
//
// A(t) = sum_{i=0..C} a_i t^i is held on the coefficient inputs; the
// coefficients of X(t) arrive one per cycle on x and the coefficients of the
// product Y(t) = A(t) X(t) leave one per cycle on y. The network is a row of
// C+1 stages. Stage k multiplies x by its coefficient and adds the output of
// the stage to its left delayed by one Z unit (the left-most stage adds zero):
//
//     least significant first (msb_first = 0): stages hold a_C ... a_0,
//         Y = sum_{i=0..C} Z^i a_i X,      y_n appears with x_n;
//     most significant first  (msb_first = 1): stages hold a_0 ... a_C,
//         Z^-C Y = sum_{j=0..C} Z^-j a_(C-j) X,  y_(n+C) appears with x_n.
//
// The two orders use the same hardware with the coefficient order reversed;
// msb_first selects the order with a multiplexer per stage and is meant to
// change only while the network is cleared.
//
// Operation: clear the delay units (clr, or C cycles of zero input), then
// stream the m+1 coefficients of X, then C zeros to run out the last C
// coefficients of Y. Y therefore takes m+C+1 cycles, one per cycle; y is
// combinational in x (one multiply and one add after the last register).
// Arithmetic is modulo 2**W, a choice of this design.
module poly_mul #(
  parameter int unsigned C = icn_pkg::POLY_DEG,
  parameter int unsigned W = icn_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic         msb_first,
  input  logic [W-1:0] a [C+1],   // a[i] = a_i
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] coef [C+1];   // coefficient of stage k, left to right
  logic [W-1:0] p    [C+1];   // adder output of stage k
  logic [W-1:0] z    [C+1];   // z[k]: delayed p[k-1], input of stage k

  always_comb begin
    for (int k = 0; k <= int'(C); k++) begin
      coef[k] = msb_first ? a[k] : a[C-k];
    end
  end

  assign z[0] = '0;

  for (genvar k = 1; k <= C; k++) begin : g_z
    z_delay #(.W(W)) u_z (
      .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(p[k-1]), .q(z[k])
    );
  end

  always_comb begin
    for (int k = 0; k <= int'(C); k++) begin
      p[k] = z[k] + coef[k] * x;
    end
  end

  assign y = p[C];

endmodule
