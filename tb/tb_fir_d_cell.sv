// tb_fir_d_cell: self-checking test of one FIR module.
// Checks s_out = a*x + (s_in of the last enabled cycle) with random signed
// operands, holding, and clearing of the module's Z unit.
module tb_fir_d_cell;
  localparam int unsigned XW = 16, CW = 16, SW = 34;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic signed [CW-1:0] a = '0;
  logic signed [XW-1:0] x = '0;
  logic signed [SW-1:0] s_in = '0, s_out;
  logic signed [SW-1:0] held, expect_s;
  int checks = 0, failures = 0;

  fir_d_cell #(.XW(XW), .CW(CW), .SW(SW)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .x(x), .s_in(s_in), .s_out(s_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = '0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a    = CW'($urandom);
      x    = XW'($urandom);
      s_in = SW'({$urandom, $urandom});
      en   = ($urandom % 4) != 0;
      clr  = ($urandom % 32) == 0;
      #1;
      expect_s = SW'(longint'(a) * longint'(x)) + held;
      checks++;
      if (s_out !== expect_s) begin
        failures++;
        $display("t=%0d s_out=%0d expected %0d", t, s_out, expect_s);
      end
      @(posedge clk);
      if (clr) held = '0; else if (en) held = s_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
