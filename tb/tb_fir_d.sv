// tb_fir_d: self-checking test of the N-tap right-to-left FIR filter.
// Random signed coefficients and samples, one sample per enabled cycle. The
// reference keeps the sample history in the testbench and evaluates
// y_(n+1) = sum_{i=1..N} a_i x_(n+1-i) directly; the filter must show it in
// the same cycle as x_n (zero cycles of latency, one output per cycle).
// Paused cycles (en low) must not advance the filter, and clr must restore
// the initial condition x_i = 0 for i <= 0. Runs with the default N = 4
// and with a longer filter.
module tb_fir_d;
  localparam int unsigned XW = 16, CW = 16;
  int checks = 0, failures = 0;
  int n_stall = 0, n_clear = 0, n_out = 0;
  logic clk = 1'b0, rst_n = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two instances: the default size and a longer one.
  localparam int unsigned N0 = 4, N1 = 9;
  localparam int unsigned SW0 = XW + CW + $clog2(N0), SW1 = XW + CW + $clog2(N1);
  logic en0 = 0, clr0 = 0, en1 = 0, clr1 = 0;
  logic signed [CW-1:0] a0 [N0], a1 [N1];
  logic signed [XW-1:0] x0 = '0, x1 = '0;
  logic signed [SW0-1:0] s0;
  logic signed [SW1-1:0] s1;

  fir_d dut0 (.clk(clk), .rst_n(rst_n), .en(en0), .clr(clr0), .a(a0), .x(x0), .s(s0));
  fir_d #(.N(N1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en1), .clr(clr1), .a(a1), .x(x1), .s(s1));

  // Sample history: hist[0] is the current sample, hist[k] the k-th older.
  longint hist0 [N0], hist1 [N1];

  initial begin
    for (int i = 0; i < int'(N0); i++) begin a0[i] = CW'($urandom); hist0[i] = 0; end
    for (int i = 0; i < int'(N1); i++) begin a1[i] = CW'($urandom); hist1[i] = 0; end
    #12 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      longint e0, e1;
      @(negedge clk);
      en0  = ($urandom % 5) != 0;
      clr0 = ($urandom % 200) == 0;
      en1  = ($urandom % 5) != 0;
      clr1 = ($urandom % 200) == 0;
      x0   = XW'($urandom);
      x1   = XW'($urandom);
      hist0[0] = longint'(x0);
      hist1[0] = longint'(x1);
      e0 = 0; e1 = 0;
      for (int i = 0; i < int'(N0); i++) e0 += longint'(a0[i]) * hist0[i];
      for (int i = 0; i < int'(N1); i++) e1 += longint'(a1[i]) * hist1[i];
      #1;
      checks += 2;
      n_out += 2;
      if (s0 !== SW0'(e0)) begin failures++; $display("N=%0d t=%0d s=%0d exp=%0d", N0, t, s0, e0); end
      if (s1 !== SW1'(e1)) begin failures++; $display("N=%0d t=%0d s=%0d exp=%0d", N1, t, s1, e1); end
      @(posedge clk);
      if (clr0) begin
        for (int i = 0; i < int'(N0); i++) hist0[i] = 0;
        n_clear++;
      end else if (en0) begin
        for (int i = int'(N0) - 1; i > 0; i--) hist0[i] = hist0[i-1];
      end else n_stall++;
      if (clr1) begin
        for (int i = 0; i < int'(N1); i++) hist1[i] = 0;
        n_clear++;
      end else if (en1) begin
        for (int i = int'(N1) - 1; i > 0; i--) hist1[i] = hist1[i-1];
      end else n_stall++;
    end
    // Impulse response: with x = delta the outputs must be a_1 .. a_N.
    @(negedge clk);
    clr0 = 1'b1; en0 = 1'b1; x0 = '0;
    @(negedge clk);
    clr0 = 1'b0;
    for (int t = 0; t < int'(N0) + 2; t++) begin
      x0 = (t == 0) ? XW'(1) : '0;
      #1;
      checks++;
      if (s0 !== ((t < int'(N0)) ? SW0'(a0[t]) : '0)) begin
        failures++; $display("impulse t=%0d s=%0d", t, s0);
      end
      @(negedge clk);
    end
    if (n_stall == 0 || n_clear == 0) failures++;
    $display("outputs=%0d stalls=%0d clears=%0d", n_out, n_stall, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
