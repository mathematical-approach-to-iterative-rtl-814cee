// icn_top: the library of iterative computation networks, side by side.
//
// Six independent networks, each with its own data and coefficient ports,
// share only the clock and the asynchronous reset:
//
//   fir_*     N-tap FIR filter with right-to-left accumulation (fir_d);
//             fir_s_n = y_(n+1) in the cycle x_n is applied.
//   mul_*     polynomial multiplier (poly_mul), either coefficient order.
//   sop_*     A X + B Y with two chains and a final adder (poly_sop).
//   sopc_*    A X + B Y with one combined chain (poly_sop_comb).
//   div_*     polynomial divider with remainder (poly_div).
//   md_*      combined multiply-divide A X / B (poly_muldiv).
//
// Every network takes one coefficient (or sample) per cycle while its en is
// high, has a synchronous clr that empties its delay units, and produces its
// output combinationally in the same cycle as its input. Nothing is shared
// between the networks, so each can be used, or removed, on its own. The
// grouping and the per-network enables and clears are this design's choice.
module icn_top #(
  parameter int unsigned N  = icn_pkg::FIR_TAPS,
  parameter int unsigned C  = icn_pkg::POLY_DEG,
  parameter int unsigned W  = icn_pkg::DATA_W,
  parameter int unsigned SW = 2 * W + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,

  // FIR filter
  input  logic                fir_en,
  input  logic                fir_clr,
  input  logic signed [W-1:0] fir_a [N],
  input  logic signed [W-1:0] fir_x,
  output logic signed [SW-1:0] fir_s,

  // polynomial multiplication
  input  logic                mul_en,
  input  logic                mul_clr,
  input  logic                mul_msb_first,
  input  logic        [W-1:0] mul_a [C+1],
  input  logic        [W-1:0] mul_x,
  output logic        [W-1:0] mul_y,

  // sum of products, separate chains
  input  logic                sop_en,
  input  logic                sop_clr,
  input  logic        [W-1:0] sop_a [C+1],
  input  logic        [W-1:0] sop_b [C+1],
  input  logic        [W-1:0] sop_x,
  input  logic        [W-1:0] sop_y,
  output logic        [W-1:0] sop_w,

  // sum of products, combined chain
  input  logic                sopc_en,
  input  logic                sopc_clr,
  input  logic        [W-1:0] sopc_a [C+1],
  input  logic        [W-1:0] sopc_b [C+1],
  input  logic        [W-1:0] sopc_x,
  input  logic        [W-1:0] sopc_y,
  output logic        [W-1:0] sopc_w,

  // polynomial division
  input  logic                div_en,
  input  logic                div_clr,
  input  logic        [W-1:0] div_a [C+1],
  input  logic        [W-1:0] div_a_inv,
  input  logic        [W-1:0] div_y,
  output logic        [W-1:0] div_x,
  output logic        [W-1:0] div_rem [C],
  output logic                div_rem_zero,

  // multiplication and division
  input  logic                md_en,
  input  logic                md_clr,
  input  logic        [W-1:0] md_a [C+1],
  input  logic        [W-1:0] md_b [C+1],
  input  logic        [W-1:0] md_b_inv,
  input  logic        [W-1:0] md_x,
  output logic        [W-1:0] md_s,
  output logic        [W-1:0] md_rem [C],
  output logic                md_rem_zero
);

  fir_d #(.N(N), .XW(W), .CW(W), .SW(SW)) u_fir (
    .clk(clk), .rst_n(rst_n), .en(fir_en), .clr(fir_clr),
    .a(fir_a), .x(fir_x), .s(fir_s)
  );

  poly_mul #(.C(C), .W(W)) u_mul (
    .clk(clk), .rst_n(rst_n), .en(mul_en), .clr(mul_clr),
    .msb_first(mul_msb_first), .a(mul_a), .x(mul_x), .y(mul_y)
  );

  poly_sop #(.C(C), .W(W)) u_sop (
    .clk(clk), .rst_n(rst_n), .en(sop_en), .clr(sop_clr),
    .a(sop_a), .b(sop_b), .x(sop_x), .y(sop_y), .w(sop_w)
  );

  poly_sop_comb #(.C(C), .W(W)) u_sopc (
    .clk(clk), .rst_n(rst_n), .en(sopc_en), .clr(sopc_clr),
    .a(sopc_a), .b(sopc_b), .x(sopc_x), .y(sopc_y), .w(sopc_w)
  );

  poly_div #(.C(C), .W(W)) u_div (
    .clk(clk), .rst_n(rst_n), .en(div_en), .clr(div_clr),
    .a(div_a), .a_inv(div_a_inv), .y(div_y),
    .x(div_x), .rem(div_rem), .rem_zero(div_rem_zero)
  );

  poly_muldiv #(.C(C), .W(W)) u_md (
    .clk(clk), .rst_n(rst_n), .en(md_en), .clr(md_clr),
    .a(md_a), .b(md_b), .b_inv(md_b_inv), .x(md_x),
    .s(md_s), .rem(md_rem), .rem_zero(md_rem_zero)
  );

endmodule
