// tb_reconfig_fir: self-checking test of the whole reconfigurable FIR filter
// (5 modules of 4 taps and the right side module).
// For many random configurations (precision mode, even or odd length, set of
// bypassed modules, random coefficients loaded serially) it clears the
// filter with zero samples, streams random samples under a random clock
// enable, and compares every output with a direct convolution of the
// samples with the impulse response the configuration should have:
// c0..c(M-1), cR[, cR], c(M-1)..c0 over the M active units, computed lane by
// lane, each lane wrapping at its accumulator width.
module tb_reconfig_fir;
  import mp_pkg::*;
  localparam int M_MOD = 5, N_ORD = 4, SEG = 13, AW = 4 * SEG;
  localparam int NU = M_MOD * N_ORD / 2;
  logic clk = 0, rst_n = 0;
  logic ce, coef_shift, evenodd;
  logic [M_MOD-1:0] bypass;
  prec_e prec;
  logic [15:0] coef_in, x_in;
  logic [AW-1:0] y_out;
  int checks = 0, failures = 0;
  int cfg_even = 0, cfg_odd = 0, cfg_byp = 0;
  int cfg_prec [4];

  reconfig_fir #(.M_MOD(M_MOD), .N_ORD(N_ORD), .SEG(SEG)) dut (.*);

  always #5 clk = ~clk;

  logic [15:0] cu [NU];    // unit coefficients
  logic [15:0] cr;         // middle coefficient
  logic [15:0] h [$];      // impulse response
  logic [15:0] hist [$];   // samples, newest first

  function automatic logic [AW-1:0] conv(prec_e p);
    int nl, iw, aw;
    logic [AW-1:0] r;
    nl = (p == PREC_4) ? 4 : (p == PREC_8) ? 2 : 1;
    iw = 16 / nl; aw = AW / nl;
    r = '0;
    for (int l = 0; l < nl; l++) begin
      longint unsigned s = 0;
      foreach (h[j]) begin
        longint unsigned xv, cv;
        xv = (longint'(hist[j]) >> (iw*l)) & ((64'd1 << iw) - 1);
        cv = (longint'(h[j]) >> (iw*l)) & ((64'd1 << iw) - 1);
        s = s + xv * cv;
      end
      s = s & ((64'd1 << aw) - 1);
      r = r | (AW'(s) << (aw*l));
    end
    return r;
  endfunction

  task automatic step(logic [15:0] x, logic en);
    @(negedge clk);
    x_in = x; ce = en;
    @(posedge clk); #1;
    if (en) begin
      hist.push_front(x);
      if (hist.size() > 64) void'(hist.pop_back());
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prec_e modes [3] = '{PREC_16, PREC_8, PREC_4};
    ce = 0; coef_shift = 0; coef_in = 0; x_in = 0; evenodd = 0; bypass = '0; prec = PREC_16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 90; cfg++) begin
      prec    = modes[cfg % 3];
      evenodd = ((cfg / 3) % 2 == 1);
      bypass  = (cfg < 6) ? '0 : M_MOD'($urandom);
      if (evenodd) cfg_even++; else cfg_odd++;
      if (bypass != 0) cfg_byp++;
      cfg_prec[prec]++;
      // serial coefficient load: middle coefficient first, c0 last
      for (int u = 0; u < NU; u++) cu[u] = 16'($urandom);
      cr = 16'($urandom);
      @(negedge clk); ce = 0; coef_shift = 1; coef_in = cr;
      for (int u = NU - 1; u >= 0; u--) begin
        @(negedge clk); coef_in = cu[u];
      end
      @(negedge clk); coef_shift = 0;
      // impulse response of this configuration
      h.delete();
      for (int u = 0; u < NU; u++) if (!bypass[u / (N_ORD/2)]) h.push_back(cu[u]);
      begin
        int na;
        na = h.size();
        h.push_back(cr);
        if (evenodd) h.push_back(cr);
        for (int u = na - 1; u >= 0; u--) h.push_back(h[u]);
      end
      // clear the filter
      hist.delete();
      for (int i = 0; i < 40; i++) step('0, 1'b1);
      // stream and check
      for (int i = 0; i < 60; i++) begin
        logic en;
        en = ($urandom % 3 != 0);
        step(16'($urandom), en);
        checks++;
        if (y_out !== conv(prec)) begin
          failures++;
          $display("FAIL cfg %0d prec=%0d even=%0d byp=%b step %0d: %h vs %h",
                   cfg, prec, evenodd, bypass, i, y_out, conv(prec));
        end
      end
    end
    checks++;
    if (cfg_even == 0 || cfg_odd == 0 || cfg_byp == 0) begin failures++; $display("FAIL coverage"); end
    $display("configs: even=%0d odd=%0d with bypass=%0d", cfg_even, cfg_odd, cfg_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
