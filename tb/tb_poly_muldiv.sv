// tb_poly_muldiv: self-checking test of S = A X / B.
// Random A, B (b_C odd) and X, streamed most significant first with random
// pauses. In half of the trials X is a multiple of B, so the division is
// exact. The reference forms A X by convolution and divides it by B with
// long division in the testbench; s_j must appear in the cycle x_j is
// applied, and after x_0 the delay units must hold the remainder.
module tb_poly_muldiv;
  import poly_ref_pkg::*;
  localparam int unsigned C = 3, W = 16;
  localparam int CI = C;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [W-1:0] a [C+1], b [C+1];
  logic [W-1:0] b_inv = 16'd1, x = '0, s;
  logic [W-1:0] rem [C];
  logic rem_zero;
  int checks = 0, failures = 0, n_exact = 0, n_inexact = 0;

  poly_muldiv dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .b(b), .b_inv(b_inv),
                   .x(x), .s(s), .rem(rem), .rem_zero(rem_zero));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t av, bv, xv, pv, qv, rv;
    int m;
    foreach (a[i]) begin a[i] = '0; b[i] = '0; end
    b[C] = 16'd1;
    #12 rst_n = 1'b1;
    for (int trial = 0; trial < 80; trial++) begin
      av = prand(C);
      bv = prand(C);
      bv[CI] = bv[CI] | 16'd1;
      if (trial[0]) xv = pmul(bv, prand($urandom % 5));
      else          xv = prand($urandom % 8);
      m = xv.size() - 1;
      pv = pmul(av, xv);
      pdivmod(pv, bv, qv, rv);
      @(negedge clk); en = 1'b0;
      foreach (a[i]) begin a[i] = av[i]; b[i] = bv[i]; end
      b_inv = winv(bv[CI]);
      clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      for (int t = 0; t <= m; t++) begin
        while ($urandom % 6 == 0) begin
          en = 1'b0; x = W'($urandom);
          @(negedge clk);
        end
        en = 1'b1;
        x = xv[m - t];
        #1;
        checks++;
        if (s !== qv[m - t]) begin failures++; $display("trial %0d t=%0d s=%h exp %h", trial, t, s, qv[m - t]); end
        @(negedge clk);
      end
      en = 1'b0;
      #1;
      for (int k = 0; k < CI; k++) begin
        checks++;
        if (rem[k] !== rv[k]) begin failures++; $display("trial %0d r%0d=%h exp %h", trial, k, rem[k], rv[k]); end
      end
      checks++;
      if (rem_zero !== (rv[0] == 0 && rv[1] == 0 && rv[2] == 0)) failures++;
      if (rem_zero) n_exact++; else n_inexact++;
    end
    if (n_exact == 0 || n_inexact == 0) failures++;
    $display("exact=%0d with_remainder=%0d", n_exact, n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
