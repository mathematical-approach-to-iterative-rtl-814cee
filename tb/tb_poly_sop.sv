// tb_poly_sop: self-checking test of W = A X + B Y with two chains.
// Random A, B (degree C) and X, Y (degree m) are streamed most significant
// first, followed by C zeros; the reference W is computed by convolution in
// the testbench and w_(n+C) must appear in the cycle x_n, y_n are applied.
module tb_poly_sop;
  import poly_ref_pkg::*;
  localparam int unsigned C = 3, W = 16;
  localparam int CI = C;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [W-1:0] a [C+1], b [C+1];
  logic [W-1:0] x = '0, y = '0, w;
  int checks = 0, failures = 0;

  poly_sop dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .b(b), .x(x), .y(y), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t av, bv, xv, yv, wv;
    #12 rst_n = 1'b1;
    for (int trial = 0; trial < 60; trial++) begin
      int m;
      m = $urandom % 8;
      av = prand(C); bv = prand(C); xv = prand(m); yv = prand(m);
      wv = padd(pmul(av, xv), pmul(bv, yv));
      foreach (a[i]) begin a[i] = av[i]; b[i] = bv[i]; end
      @(negedge clk); clr = 1'b1; en = 1'b0;
      @(negedge clk); clr = 1'b0; en = 1'b1;
      for (int t = 0; t <= m + CI; t++) begin
        logic [W-1:0] wexp;
        x = '0; y = '0;
        if (t <= m) begin x = xv[m - t]; y = yv[m - t]; end
        wexp = wv[m + CI - t];
        #1;
        checks++;
        if (w !== wexp) begin failures++; $display("trial %0d t=%0d w=%h exp %h", trial, t, w, wexp); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
