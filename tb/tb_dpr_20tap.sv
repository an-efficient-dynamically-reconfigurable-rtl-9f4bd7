// tb_dpr_20tap: the partial-reconfiguration experiment on the filter at its
// default size (5 modules of 4 taps and the right side module).
//
// A 20-tap symmetric response g[0..19] (g[k] = g[19-k]) is built from the
// 22-tap even setting with the outermost coefficient c0 = 0; the filter then
// computes y[n] = sum_k g[k]·x[n-1-k]. Each output is compared with a
// fixed 20-tap direct-form filter computed here from the same samples.
// While samples keep streaming, module 2 is swapped for the bypass module
// and later put back, with no reload and no reset. After each swap the
// output must settle to the new response (16 taps without module 2) within
// the filter length, and from then on match it exactly. Runs in all three
// precision modes, each lane a separate filter. Counts the swaps, the
// steps it took to settle and the matching outputs before and after.
module tb_dpr_20tap;
  import mp_pkg::*;
  localparam int M_MOD = 5, N_ORD = 4, SEG = 13, AW = 4 * SEG;
  localparam int NU = M_MOD * N_ORD / 2;
  localparam int SWAP_MOD = 2;
  localparam int SETTLE_MAX = 2 * NU + 2;
  logic clk = 0, rst_n = 0;
  logic ce, coef_shift, evenodd;
  logic [M_MOD-1:0] bypass;
  prec_e prec;
  logic [15:0] coef_in, x_in;
  logic [AW-1:0] y_out;
  int checks = 0, failures = 0;
  int n_swaps = 0, n_match_full = 0, n_match_reduced = 0, worst_settle = 0;

  reconfig_fir #(.M_MOD(M_MOD), .N_ORD(N_ORD), .SEG(SEG)) dut (.*);

  always #5 clk = ~clk;

  logic [15:0] cu [NU];   // unit coefficients, cu[0] = 0
  logic [15:0] cr;        // middle coefficient
  logic [15:0] g [$];     // taps of the reference direct-form filter
  logic [15:0] hist [$];  // samples, newest first

  // Direct-form reference: y = sum_k g[k]·x[n-1-k], lane by lane.
  function automatic logic [AW-1:0] ref_y(prec_e p);
    int nl, iw, aw;
    logic [AW-1:0] r;
    nl = (p == PREC_4) ? 4 : (p == PREC_8) ? 2 : 1;
    iw = 16 / nl; aw = AW / nl;
    r = '0;
    for (int l = 0; l < nl; l++) begin
      longint unsigned s;
      s = 0;
      foreach (g[k]) begin
        longint unsigned xv, cv;
        xv = (longint'(hist[k + 1]) >> (iw*l)) & ((64'd1 << iw) - 1);
        cv = (longint'(g[k]) >> (iw*l)) & ((64'd1 << iw) - 1);
        s = s + xv * cv;
      end
      s = s & ((64'd1 << aw) - 1);
      r = r | (AW'(s) << (aw*l));
    end
    return r;
  endfunction

  // Taps of the symmetric filter without the units of module `skip`
  // (skip < 0: all modules), leaving out the zero outer coefficient.
  task automatic make_taps(int skip);
    logic [15:0] half [$];
    g.delete();
    for (int u = 1; u < NU; u++) if (u / (N_ORD/2) != skip) half.push_back(cu[u]);
    foreach (half[i]) g.push_back(half[i]);
    g.push_back(cr);
    g.push_back(cr);
    for (int i = half.size() - 1; i >= 0; i--) g.push_back(half[i]);
  endtask

  task automatic step(logic [15:0] x);
    @(negedge clk);
    x_in = x; ce = 1'b1;
    @(posedge clk); #1;
    hist.push_front(x);
    if (hist.size() > 64) void'(hist.pop_back());
  endtask

  // Stream n samples; returns the number of steps before the output matched
  // the reference and stayed matched, or -1 if it never settled.
  task automatic stream(int n, output int settled);
    settled = -1;
    for (int i = 0; i < n; i++) begin
      step(16'($urandom));
      if (y_out === ref_y(prec)) begin
        if (settled < 0) settled = i;
      end else begin
        settled = -1;
      end
    end
  endtask

  // Stream n samples after the filter has settled; every output is checked.
  task automatic stream_checked(int n, ref int n_match);
    for (int i = 0; i < n; i++) begin
      step(16'($urandom));
      checks++;
      if (y_out !== ref_y(prec)) begin
        failures++;
        $display("FAIL prec=%0d bypass=%b step %0d: %h vs %h", prec, bypass, i, y_out, ref_y(prec));
      end else begin
        n_match++;
      end
    end
  endtask

  task automatic swap(logic to_bypass, int skip);
    int s;
    @(negedge clk);
    bypass[SWAP_MOD] = to_bypass;
    n_swaps++;
    make_taps(skip);
    stream(SETTLE_MAX + 4, s);
    checks++;
    if (s < 0 || s > SETTLE_MAX) begin
      failures++;
      $display("FAIL prec=%0d swap to bypass=%b did not settle within %0d steps (%0d)",
               prec, bypass, SETTLE_MAX, s);
    end
    if (s > worst_settle) worst_settle = s;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prec_e modes [3];
    modes = '{PREC_16, PREC_8, PREC_4};
    ce = 0; coef_shift = 0; coef_in = 0; x_in = 0; evenodd = 1'b1; bypass = '0; prec = PREC_16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (modes[m]) begin
      prec = modes[m];
      bypass = '0;
      // coefficients: c0 = 0 gives 20 taps out of the 22-tap even setting
      cu[0] = '0;
      for (int u = 1; u < NU; u++) cu[u] = 16'($urandom);
      cr = 16'($urandom);
      @(negedge clk); ce = 0; coef_shift = 1; coef_in = cr;
      for (int u = NU - 1; u >= 0; u--) begin
        @(negedge clk); coef_in = cu[u];
      end
      @(negedge clk); coef_shift = 0;
      make_taps(-1);
      checks++;
      if (g.size() != 20) begin failures++; $display("FAIL tap count %0d", g.size()); end
      // fill the filter, then the full 20-tap filter must match
      hist.delete();
      for (int i = 0; i < SETTLE_MAX; i++) step(16'($urandom));
      stream_checked(40, n_match_full);
      // module 2 out, filter keeps running
      swap(1'b1, SWAP_MOD);
      checks++;
      if (g.size() != 16) begin failures++; $display("FAIL reduced tap count %0d", g.size()); end
      stream_checked(40, n_match_reduced);
      // module 2 back in
      swap(1'b0, -1);
      stream_checked(40, n_match_full);
    end
    checks++;
    if (n_swaps == 0 || n_match_full == 0 || n_match_reduced == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("swaps:%0d settle (steps, worst):%0d outputs matching 20-tap:%0d 16-tap:%0d",
             n_swaps, worst_settle, n_match_full, n_match_reduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
