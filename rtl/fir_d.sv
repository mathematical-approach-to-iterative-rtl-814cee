// fir_d: N-tap FIR filter with right-to-left accumulation (system D).
//
// Computes y_n = sum_{i=1..N} a_i x_(n-i). The network is N fir_d_cell
// modules in a row, coefficient a_1 at the left (output) end and a_N at the
// right end, where a constant zero enters the partial-sum chain. Module i
// adds a_i x_n to the partial sum of module i+1 delayed by one cycle, so the
// product a_i x is delayed i-1 times before it reaches the output:
//
//     s = sum_{i=1..N} Z^(i-1) a_i x = Z^-1 Y,   i.e.  s_n = y_(n+1)
//
// The output therefore appears in the same cycle as the newest sample x_n
// that it uses: the filter has no latency and is one cycle ahead of the
// textbook definition. The critical path is one multiply and one add,
// independent of N, and the network holds N registers, all of them on the
// partial-sum line. The right-most register always holds zero; it is kept
// so that all modules are the same, as the network is drawn.
//
// Interface: one sample per cycle on x while en is high (en low freezes the
// filter); a[i-1] holds a_i and is expected to stay constant while the
// filter runs; clr empties the delay units so that x_i = 0 for i <= 0.
// Widths are this design's choice; SW is wide enough for any input.
module fir_d #(
  parameter int unsigned N  = icn_pkg::FIR_TAPS,
  parameter int unsigned XW = icn_pkg::DATA_W,
  parameter int unsigned CW = icn_pkg::DATA_W,
  parameter int unsigned SW = XW + CW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clr,
  input  logic signed [CW-1:0] a [N],   // a[i-1] = a_i
  input  logic signed [XW-1:0] x,
  output logic signed [SW-1:0] s        // s_n = y_(n+1)
);

  // chain[i] is the partial sum leaving module i+1 towards the left;
  // chain[N] is the constant zero fed into the right-most module.
  logic signed [SW-1:0] chain [N+1];

  assign chain[N] = '0;

  for (genvar i = 0; i < N; i++) begin : g_mod
    fir_d_cell #(.XW(XW), .CW(CW), .SW(SW)) u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .clr  (clr),
      .a    (a[i]),
      .x    (x),
      .s_in (chain[i+1]),
      .s_out(chain[i])
    );
  end

  assign s = chain[0];

endmodule
