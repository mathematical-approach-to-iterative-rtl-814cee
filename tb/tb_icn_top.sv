// tb_icn_top: end-to-end test of all six networks through icn_top, at the
// default sizes (N = 4 taps, degree C = 3, 16-bit words).
//
// Phases, each compared with references computed in the testbench:
//   1. FIR filter on a random signal with pauses and clears.
//   2. Multiplier in both coefficient orders, cleared by clr or by C zeros.
//   3. Both sum-of-products networks on the same operands (also compared
//      with each other).
//   4. Multiply then divide: the multiplier's output, most significant
//      first, feeds the divider cycle by cycle; the divider must return X
//      with a zero remainder.
//   5. Divider on dividends with a non-zero remainder.
//   6. Multiply-divide network, exact and inexact.
// Each mechanism (pause, clear, zero-input clearing, run-out, both orders,
// exact and inexact division, remainder detection) is counted and must
// occur at least once.
module tb_icn_top;
  import poly_ref_pkg::*;
  localparam int unsigned N = 4, C = 3, W = 16, SW = 2 * W + 2;
  localparam int CI = C;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fir_en = 0, fir_clr = 0;
  logic signed [W-1:0] fir_a [N];
  logic signed [W-1:0] fir_x = '0;
  logic signed [SW-1:0] fir_s;
  logic mul_en = 0, mul_clr = 0, mul_msb_first = 0;
  logic [W-1:0] mul_a [C+1];
  logic [W-1:0] mul_x = '0, mul_y;
  logic sop_en = 0, sop_clr = 0, sopc_en = 0, sopc_clr = 0;
  logic [W-1:0] sop_a [C+1], sop_b [C+1], sopc_a [C+1], sopc_b [C+1];
  logic [W-1:0] sop_x = '0, sop_y = '0, sop_w, sopc_x = '0, sopc_y = '0, sopc_w;
  logic div_en = 0, div_clr = 0;
  logic [W-1:0] div_a [C+1];
  logic [W-1:0] div_a_inv = 16'd1, div_y, div_x;
  logic [W-1:0] div_rem [C];
  logic div_rem_zero;
  logic div_from_mul = 1'b0;
  logic [W-1:0] div_y_tb = '0;
  logic md_en = 0, md_clr = 0;
  logic [W-1:0] md_a [C+1], md_b [C+1];
  logic [W-1:0] md_b_inv = 16'd1, md_x = '0, md_s;
  logic [W-1:0] md_rem [C];
  logic md_rem_zero;

  int checks = 0, failures = 0;
  int n_fir_out = 0, n_fir_pause = 0, n_fir_clear = 0;
  int n_mul_lsb = 0, n_mul_msb = 0, n_zero_clear = 0, n_runout = 0;
  int n_sop = 0, n_roundtrip = 0;
  int n_div_exact = 0, n_div_rem = 0, n_md_exact = 0, n_md_rem = 0;

  // In phase 4 the divider reads the multiplier's output directly.
  assign div_y = div_from_mul ? mul_y : div_y_tb;

  icn_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic mech(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  // ---------------------------------------------------------------- FIR
  task automatic run_fir();
    longint hist [N];
    longint e;
    foreach (fir_a[i]) fir_a[i] = W'($urandom);
    foreach (hist[i]) hist[i] = 0;
    @(negedge clk); fir_clr = 1'b1;
    @(negedge clk); fir_clr = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      fir_en  = ($urandom % 5) != 0;
      fir_clr = ($urandom % 150) == 0;
      fir_x   = W'($urandom);
      hist[0] = longint'(fir_x);
      e = 0;
      foreach (hist[i]) e += longint'(fir_a[i]) * hist[i];
      #1;
      check_eq("fir", 64'(fir_s), 64'(SW'(e)));
      n_fir_out++;
      @(posedge clk);
      if (fir_clr) begin foreach (hist[i]) hist[i] = 0; n_fir_clear++; end
      else if (fir_en) begin for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1]; end
      else n_fir_pause++;
    end
    @(negedge clk); fir_en = 1'b0; fir_clr = 1'b0;
  endtask

  // ---------------------------------------------------------- multiplier
  task automatic run_mul(input bit msb, input bit zero_clear);
    poly_t av, xv, yv;
    int m;
    logic [W-1:0] xin;
    m = $urandom % 10;
    av = prand(C); xv = prand(m); yv = pmul(av, xv);
    foreach (mul_a[i]) mul_a[i] = av[i];
    mul_msb_first = msb;
    @(negedge clk);
    if (zero_clear) begin
      mul_en = 1'b1;
      for (int k = 0; k < 5; k++) begin mul_x = W'($urandom); @(negedge clk); end
      for (int k = 0; k < CI; k++) begin mul_x = '0; @(negedge clk); end
      n_zero_clear++;
    end else begin
      mul_clr = 1'b1; @(negedge clk); mul_clr = 1'b0;
    end
    mul_en = 1'b1;
    for (int t = 0; t <= m + CI; t++) begin
      xin = '0;
      if (t <= m) xin = msb ? xv[m - t] : xv[t];
      mul_x = xin;
      #1;
      if (msb) check_eq("mul msb", 64'(mul_y), 64'(yv[m + CI - t]));
      else     check_eq("mul lsb", 64'(mul_y), 64'(yv[t]));
      if (t > m) n_runout++;
      @(negedge clk);
    end
    mul_en = 1'b0;
    if (msb) n_mul_msb++; else n_mul_lsb++;
  endtask

  // ------------------------------------------------------ sum of products
  task automatic run_sop();
    poly_t av, bv, xv, yv, wv;
    int m;
    m = $urandom % 10;
    av = prand(C); bv = prand(C); xv = prand(m); yv = prand(m);
    wv = padd(pmul(av, xv), pmul(bv, yv));
    foreach (sop_a[i]) begin
      sop_a[i] = av[i]; sop_b[i] = bv[i]; sopc_a[i] = av[i]; sopc_b[i] = bv[i];
    end
    @(negedge clk); sop_clr = 1'b1; sopc_clr = 1'b1;
    @(negedge clk); sop_clr = 1'b0; sopc_clr = 1'b0; sop_en = 1'b1; sopc_en = 1'b1;
    for (int t = 0; t <= m + CI; t++) begin
      sop_x = '0; sop_y = '0;
      if (t <= m) begin sop_x = xv[m - t]; sop_y = yv[m - t]; end
      sopc_x = sop_x; sopc_y = sop_y;
      #1;
      check_eq("sop", 64'(sop_w), 64'(wv[m + CI - t]));
      check_eq("sop combined", 64'(sopc_w), 64'(wv[m + CI - t]));
      @(negedge clk);
    end
    sop_en = 1'b0; sopc_en = 1'b0;
    n_sop++;
  endtask

  // ------------------------------------- multiply, then divide the product
  task automatic run_roundtrip();
    poly_t av, xv;
    int m;
    m = $urandom % 10;
    av = prand(C); av[CI] = av[CI] | 16'd1;
    xv = prand(m);
    foreach (mul_a[i]) begin mul_a[i] = av[i]; div_a[i] = av[i]; end
    div_a_inv = winv(av[CI]);
    mul_msb_first = 1'b1;
    div_from_mul = 1'b1;
    @(negedge clk); mul_clr = 1'b1; div_clr = 1'b1;
    @(negedge clk); mul_clr = 1'b0; div_clr = 1'b0; mul_en = 1'b1; div_en = 1'b1;
    for (int t = 0; t <= m + CI; t++) begin
      mul_x = (t <= m) ? xv[m - t] : '0;
      #1;
      if (t >= CI) check_eq("round trip", 64'(div_x), 64'(xv[m + CI - t]));
      @(negedge clk);
    end
    mul_en = 1'b0; div_en = 1'b0;
    #1;
    check_eq("round trip remainder", 64'(div_rem_zero), 64'(1));
    div_from_mul = 1'b0;
    n_roundtrip++;
  endtask

  // ---------------------------------------------- divider with remainder
  task automatic run_div(input bit exact);
    poly_t av, xv, rv, yv;
    int m;
    m = $urandom % 10;
    av = prand(C); av[CI] = av[CI] | 16'd1;
    xv = prand(m);
    rv = prand(CI - 1);
    if (exact) foreach (rv[i]) rv[i] = '0;
    else rv[0] = rv[0] | 16'd1;
    yv = padd(pmul(av, xv), rv);
    foreach (div_a[i]) div_a[i] = av[i];
    div_a_inv = winv(av[CI]);
    @(negedge clk); div_clr = 1'b1;
    @(negedge clk); div_clr = 1'b0; div_en = 1'b1;
    for (int t = 0; t <= m + CI; t++) begin
      div_y_tb = yv[m + CI - t];
      #1;
      if (t >= CI) check_eq("div quotient", 64'(div_x), 64'(xv[m + CI - t]));
      @(negedge clk);
    end
    div_en = 1'b0;
    #1;
    for (int k = 0; k < CI; k++) check_eq("div remainder", 64'(div_rem[k]), 64'(rv[k]));
    check_eq("div rem_zero", 64'(div_rem_zero), 64'(exact));
    if (div_rem_zero) n_div_exact++; else n_div_rem++;
  endtask

  // -------------------------------------------------- multiply-divide
  task automatic run_md(input bit exact);
    poly_t av, bv, xv, pv, qv, rv;
    int m;
    av = prand(C); bv = prand(C); bv[CI] = bv[CI] | 16'd1;
    if (exact) xv = pmul(bv, prand($urandom % 6));
    else begin
      xv = prand($urandom % 10);
      xv[0] = xv[0] + 16'd1;
    end
    m = xv.size() - 1;
    pv = pmul(av, xv);
    pdivmod(pv, bv, qv, rv);
    foreach (md_a[i]) begin md_a[i] = av[i]; md_b[i] = bv[i]; end
    md_b_inv = winv(bv[CI]);
    @(negedge clk); md_clr = 1'b1;
    @(negedge clk); md_clr = 1'b0; md_en = 1'b1;
    for (int t = 0; t <= m; t++) begin
      md_x = xv[m - t];
      #1;
      check_eq("muldiv", 64'(md_s), 64'(qv[m - t]));
      @(negedge clk);
    end
    md_en = 1'b0;
    #1;
    for (int k = 0; k < CI; k++) check_eq("muldiv remainder", 64'(md_rem[k]), 64'(rv[k]));
    if (md_rem_zero) n_md_exact++; else n_md_rem++;
  endtask

  initial begin
    foreach (fir_a[i]) fir_a[i] = '0;
    foreach (mul_a[i]) begin
      mul_a[i] = '0; sop_a[i] = '0; sop_b[i] = '0; sopc_a[i] = '0; sopc_b[i] = '0;
      div_a[i] = '0; md_a[i] = '0; md_b[i] = '0;
    end
    div_a[C] = 16'd1; md_b[C] = 16'd1;
    #12 rst_n = 1'b1;
    run_fir();
    for (int i = 0; i < 12; i++) run_mul(i[0], i[1]);
    for (int i = 0; i < 6; i++) run_sop();
    for (int i = 0; i < 6; i++) run_roundtrip();
    for (int i = 0; i < 8; i++) run_div(i[0]);
    for (int i = 0; i < 8; i++) run_md(i[0]);
    mech("fir pause", n_fir_pause);
    mech("fir clear", n_fir_clear);
    mech("mul least significant first", n_mul_lsb);
    mech("mul most significant first", n_mul_msb);
    mech("clearing by zero inputs", n_zero_clear);
    mech("run-out", n_runout);
    mech("sum of products", n_sop);
    mech("multiply-divide round trip", n_roundtrip);
    mech("exact division", n_div_exact);
    mech("division with remainder", n_div_rem);
    mech("exact multiply-divide", n_md_exact);
    mech("multiply-divide with remainder", n_md_rem);
    $display("fir outputs=%0d pauses=%0d clears=%0d", n_fir_out, n_fir_pause, n_fir_clear);
    $display("mul lsb=%0d msb=%0d zero_clears=%0d runout_cycles=%0d", n_mul_lsb, n_mul_msb, n_zero_clear, n_runout);
    $display("sop=%0d round_trips=%0d div exact=%0d rem=%0d muldiv exact=%0d rem=%0d",
             n_sop, n_roundtrip, n_div_exact, n_div_rem, n_md_exact, n_md_rem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
