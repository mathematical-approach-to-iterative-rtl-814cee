// tb_poly_div: self-checking test of the polynomial divider.
// Each trial builds the dividend from known parts, Y = A X + R, with random
// A (leading coefficient odd), quotient X of degree m and remainder R of
// degree below C (zero in half of the trials). Y is streamed most
// significant first with random pauses; the divider must show x_j in the
// cycle y_j is applied (after C initial cycles) and leave R in its delay
// units, with rem_zero set exactly when R is zero.
module tb_poly_div;
  import poly_ref_pkg::*;
  localparam int unsigned C = 3, W = 16;
  localparam int CI = C;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [W-1:0] a [C+1];
  logic [W-1:0] a_inv = 16'd1, y = '0, x;
  logic [W-1:0] rem [C];
  logic rem_zero;
  int checks = 0, failures = 0, n_exact = 0, n_inexact = 0;

  poly_div dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .a_inv(a_inv),
                .y(y), .x(x), .rem(rem), .rem_zero(rem_zero));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t av, xv, rv, yv;
    foreach (a[i]) a[i] = '0;
    a[C] = 16'd1;
    #12 rst_n = 1'b1;
    for (int trial = 0; trial < 80; trial++) begin
      int m;
      bit exact;
      m = $urandom % 8;
      exact = trial[0];
      av = prand(C);
      av[CI] = av[CI] | 16'd1;
      xv = prand(m);
      rv = prand(CI - 1);
      if (exact) foreach (rv[i]) rv[i] = '0;
      yv = padd(pmul(av, xv), rv);
      @(negedge clk); en = 1'b0;
      foreach (a[i]) a[i] = av[i];
      a_inv = winv(av[CI]);
      clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      for (int t = 0; t <= m + CI; t++) begin
        while ($urandom % 6 == 0) begin
          en = 1'b0; y = W'($urandom);
          @(negedge clk);
        end
        en = 1'b1;
        y = yv[m + CI - t];
        #1;
        checks++;
        if (t < CI) begin
          if (x !== '0) begin failures++; $display("trial %0d t=%0d x=%h before first quotient", trial, t, x); end
        end else if (x !== xv[m + CI - t]) begin
          failures++; $display("trial %0d t=%0d x=%h exp %h", trial, t, x, xv[m + CI - t]);
        end
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
