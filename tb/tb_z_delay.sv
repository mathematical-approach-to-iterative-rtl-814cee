// tb_z_delay: self-checking test of the Z unit.
// Drives random data with random enable and clear and compares q, every
// cycle, with a reference register kept in the testbench: after a rising
// edge q must equal d if en was high, zero if clr was high, and otherwise
// keep its value. Also checks the asynchronous reset.
module tb_z_delay;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  z_delay #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    #12;
    checks++; if (q !== '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      d   = W'($urandom);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 16) == 0;
      @(posedge clk);
      if (clr) ref_q = '0; else if (en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("t=%0d q=%h expected %h", t, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
