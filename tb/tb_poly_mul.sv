// tb_poly_mul: self-checking test of the polynomial multiplier.
// Each trial takes a random A (degree C) and X (degree m), clears the
// network either with clr or by feeding C zeros after random data, streams
// X in the chosen order followed by C run-out zeros, and compares every
// output with the convolution computed in the testbench: in least-
// significant-first order y_n must appear with x_n, in most-significant-
// first order y_(n+C) must appear with x_n, one coefficient per cycle.
// Random pause cycles (en low) are inserted and must not disturb the result.
module tb_poly_mul;
  import poly_ref_pkg::*;
  localparam int unsigned C = 3, W = 16;
  localparam int CI = C;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0, msb_first = 1'b0;
  logic [W-1:0] a [C+1];
  logic [W-1:0] x = '0, y;
  int checks = 0, failures = 0;
  int n_lsb = 0, n_msb = 0, n_zclear = 0, n_pause = 0;

  poly_mul dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .msb_first(msb_first),
                .a(a), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle with the network advancing; random pauses before it.
  task automatic step(input logic [W-1:0] xv, input bit check, input logic [W-1:0] expv);
    while ($urandom % 6 == 0) begin
      @(negedge clk); en = 1'b0; x = W'($urandom); n_pause++;
    end
    @(negedge clk);
    en = 1'b1; x = xv;
    #1;
    if (check) begin
      checks++;
      if (y !== expv) begin failures++; $display("y=%h expected %h", y, expv); end
    end
  endtask

  initial begin
    poly_t av, xv, yv;
    #12 rst_n = 1'b1;
    for (int trial = 0; trial < 80; trial++) begin
      int m;
      m = $urandom % 8;
      av = prand(C);
      xv = prand(m);
      yv = pmul(av, xv);
      foreach (a[i]) a[i] = av[i];
      msb_first = trial[0];
      if (trial % 3 == 0) begin
        // junk, then C zeros as the clearing sequence
        for (int k = 0; k < 4; k++) step(W'($urandom), 0, '0);
        for (int k = 0; k < int'(C); k++) step('0, 0, '0);
        n_zclear++;
      end else begin
        @(negedge clk); clr = 1'b1; en = 1'b0;
        @(negedge clk); clr = 1'b0;
      end
      for (int t = 0; t <= m + int'(C); t++) begin
        logic [W-1:0] xin, yexp;
        xin = '0;
        if (!msb_first) begin
          if (t <= m) xin = xv[t];
          yexp = yv[t];
        end else begin
          if (t <= m) xin = xv[m - t];
          yexp = yv[m + CI - t];
        end
        step(xin, 1, yexp);
      end
      if (msb_first) n_msb++; else n_lsb++;
    end
    if (n_lsb == 0 || n_msb == 0 || n_zclear == 0 || n_pause == 0) failures++;
    $display("lsb=%0d msb=%0d zero_clears=%0d pauses=%0d", n_lsb, n_msb, n_zclear, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
