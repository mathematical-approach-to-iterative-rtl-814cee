// fir_d_cell: one module of the right-to-left FIR filter (system D).
//
// The filter is a row of identical modules. The input sample x is broadcast
// to all of them. Each module multiplies x by its own coefficient a_i and
// adds the partial sum that arrives from its right-hand neighbour after one
// Z unit:
//
//     s_out = a_i * x + Z s_in
//
// Because the partial sums travel right to left while x reaches every module
// in the same cycle, one register per module both pipelines the adder chain
// and aligns the products in time; no delay is needed on the x line.
//
// Timing: s_out is combinational in x and a (one multiply and one add); the
// Z unit captures s_in on the rising clock edge when en is high. The widths
// are this design's choice: x is XW bits, a is CW bits, and partial sums are
// SW bits, wide enough that the filter cannot overflow.
module fir_d_cell #(
  parameter int unsigned XW = 16,
  parameter int unsigned CW = 16,
  parameter int unsigned SW = 34
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clr,
  input  logic signed [CW-1:0] a,      // coefficient a_i
  input  logic signed [XW-1:0] x,      // broadcast input sample
  input  logic signed [SW-1:0] s_in,   // partial sum from the module on the right
  output logic signed [SW-1:0] s_out   // partial sum to the module on the left
);

  logic signed [SW-1:0] s_del;
  logic signed [SW-1:0] prod;

  z_delay #(.W(SW)) u_z (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(s_in), .q(s_del)
  );

  always_comb begin
    prod  = SW'(a) * SW'(x);
    s_out = prod + s_del;
  end

endmodule
