// tb_mp_fir_top: end-to-end test of the whole system at its default sizes
// (5 filter modules of 4 taps, 16-entry scheduler queues).
//
// Filter path: for a series of configurations covering all three precision
// modes, even and odd length and bypassed modules, it loads random
// coefficients serially, clears the filter, streams random samples at the
// rate set by sel and compares every output with a direct convolution; it
// also checks the filter's enable rate for several sel codes.
// Operand path: it streams 600 random operand pairs of mixed effective width,
// sends some of them late (just after the rising edge that should capture
// them) to provoke razor errors, keeps going while the scheduler is full,
// flushes, and checks that every pair comes back exactly once as the right
// product in the right lane under its tag.
// Every mechanism must occur at least once: each precision mode, even and
// odd length, bypass, razor error, scheduler back-pressure, flushed partial
// pattern, frequency change, precision group change.
module tb_mp_fir_top;
  import mp_pkg::*;
  localparam int M_MOD = 5, N_ORD = 4, SEG = 13, AW = 4 * SEG;
  localparam int NU = M_MOD * N_ORD / 2;
  localparam int NPAIR = 600;

  logic clk = 0, rst_n = 1;
  logic sys_clk;
  logic [2:0] sel;
  logic [1:0] con;
  logic evenodd, coef_shift, fir_ce;
  logic [M_MOD-1:0] mod_bypass;
  logic [15:0] coef_in, fir_x;
  logic [AW-1:0] fir_y;
  logic [15:0] x, y;
  logic xy_valid, xy_flush, xy_ready, er, op_valid;
  logic [31:0] op;
  logic [1:0] op_prec;
  logic [3:0] op_lanes;
  logic [4*TAG_W-1:0] op_tags;
  logic [2:0] freq_code;
  logic [15:0] freq_changes;
  logic freq_settling, ios_empty;

  mp_fir_top dut (.*);

  always #5 clk = ~clk;  // 100 MHz reference, 50 MHz system clock

  int checks = 0, failures = 0;
  // mechanism counters
  int n_prec [4] = '{0, 0, 0, 0};
  int n_even = 0, n_odd = 0, n_bypass = 0, n_razor = 0, n_late = 0;
  int n_backpressure = 0, n_partial = 0, n_groups = 0, n_ops = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ filter model
  logic [15:0] cu [NU];
  logic [15:0] cr;
  logic [15:0] h [$];
  logic [15:0] hist [$];

  function automatic logic [AW-1:0] conv(prec_e p);
    int nl, iw, aw;
    logic [AW-1:0] r;
    nl = (p == PREC_4) ? 4 : (p == PREC_8) ? 2 : 1;
    iw = 16 / nl; aw = AW / nl;
    r = '0;
    for (int l = 0; l < nl; l++) begin
      longint unsigned s;
      s = 0;
      for (int j = 0; j < h.size() && j < hist.size(); j++) begin
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

  // Runs n filter enables; random samples unless zero is set; checks y
  // after every enable.
  task automatic run_filter(int n, bit zero, bit check);
    int done = 0;
    while (done < n) begin
      @(negedge sys_clk);
      if (check) begin
        checks++;
        if (fir_y !== conv(prec_e'(con))) begin
          fail($sformatf("filter con=%b even=%b byp=%b: %h vs %h", con, evenodd, mod_bypass,
                         fir_y, conv(prec_e'(con))));
        end
      end
      if (fir_ce) begin
        fir_x = zero ? '0 : 16'($urandom);
        hist.push_front(fir_x);
        if (hist.size() > 64) void'(hist.pop_back());
        done++;
      end
    end
    @(negedge sys_clk);
  endtask

  task automatic configure(logic [1:0] c, logic eo, logic [M_MOD-1:0] byp, logic [2:0] s);
    @(negedge sys_clk);
    con = c; evenodd = eo; mod_bypass = byp; sel = s;
    for (int u = 0; u < NU; u++) cu[u] = 16'($urandom);
    cr = 16'($urandom);
    coef_shift = 1; coef_in = cr;
    for (int u = NU - 1; u >= 0; u--) begin
      @(negedge sys_clk); coef_in = cu[u];
    end
    @(negedge sys_clk); coef_shift = 0;
    h.delete();
    for (int u = 0; u < NU; u++) if (!byp[u / (N_ORD/2)]) h.push_back(cu[u]);
    begin
      int na;
      na = h.size();
      h.push_back(cr);
      if (eo) h.push_back(cr);
      for (int u = na - 1; u >= 0; u--) h.push_back(h[u]);
    end
    n_prec[c]++;
    if (eo) n_even++; else n_odd++;
    if (byp != 0) n_bypass++;
    hist.delete();
    run_filter(2 * NU + 4, 1'b1, 1'b0);
  endtask

  // ----------------------------------------------------------- operand model
  logic [15:0] px [NPAIR];
  logic [15:0] py [NPAIR];
  int          seen [NPAIR];

  function automatic prec_e cls(logic [15:0] a, logic [15:0] b);
    if (a < 16 && b < 16)   return PREC_4;
    if (a < 256 && b < 256) return PREC_8;
    return PREC_16;
  endfunction

  // Monitors start once the internal reset has been applied.
  logic rst_done = 1'b0;
  prec_e last_op_prec = PREC_RSVD;
  always @(posedge sys_clk) if (rst_done && op_valid) begin
    int w;
    n_ops++;
    if (prec_e'(op_prec) != last_op_prec) n_groups++;
    last_op_prec = prec_e'(op_prec);
    w = (prec_e'(op_prec) == PREC_4) ? 4 : (prec_e'(op_prec) == PREC_8) ? 8 : 16;
    if (op_lanes != ((w == 4) ? 4'b1111 : (w == 8) ? 4'b0011 : 4'b0001)) n_partial++;
    for (int l = 0; l < 4; l++) if (op_lanes[l]) begin
      int t;
      longint unsigned got, expv;
      t = int'(op_tags[TAG_W*l +: TAG_W]);
      // tags are 8 bits: find the pair of this tag still waiting
      while (t < NPAIR && seen[t] != 0) t += 256;
      checks++;
      if (t >= NPAIR) begin fail("unknown tag"); continue; end
      seen[t]++;
      got  = (longint'(op) >> (2*w*l)) & ((64'd1 << (2*w)) - 1);
      expv = longint'(px[t]) * longint'(py[t]);
      if (cls(px[t], py[t]) != prec_e'(op_prec) || got != expv) begin
        fail($sformatf("pair %0d (%h*%h) lane %0d prec %0d: %h", t, px[t], py[t], l, op_prec, got));
      end
    end
  end

  always @(posedge er) if (rst_done) n_razor++;

  // ------------------------------------------------------------- watchdog
  initial begin
    #5000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- main
  initial begin
    sel = 3'd7; con = 2'b10; evenodd = 0; mod_bypass = '0; coef_shift = 0; coef_in = 0;
    fir_x = 0; x = 0; y = 0; xy_valid = 0; xy_flush = 0;
    #2 rst_n = 0;
    #100 rst_n = 1;
    repeat (3) @(posedge sys_clk);
    rst_done = 1'b1;

    // ---- filter rate for several codes: (sel+1) * 5 MHz of 50 MHz
    foreach (sel_codes[i]) begin
      int n;
      @(negedge sys_clk); sel = sel_codes[i];
      repeat (10) @(negedge sys_clk);
      n = 0;
      repeat (200) begin @(negedge sys_clk); if (fir_ce) n++; end
      checks++;
      if (n != (int'(sel_codes[i]) + 1) * 20) fail($sformatf("sel %0d gave %0d enables", sel_codes[i], n));
    end

    // ---- filter configurations
    configure(2'b10, 1'b0, 5'b00000, 3'd7); run_filter(40, 1'b0, 1'b1);
    configure(2'b01, 1'b1, 5'b00000, 3'd4); run_filter(40, 1'b0, 1'b1);
    configure(2'b11, 1'b0, 5'b00100, 3'd1); run_filter(40, 1'b0, 1'b1);
    configure(2'b10, 1'b1, 5'b10010, 3'd7); run_filter(40, 1'b0, 1'b1);
    configure(2'b11, 1'b1, 5'b01001, 3'd7); run_filter(40, 1'b0, 1'b1);
    configure(2'b01, 1'b0, 5'b11110, 3'd2); run_filter(40, 1'b0, 1'b1);

    // ---- operand path
    for (int i = 0; i < NPAIR; i++) begin
      seen[i] = 0;
      case ($urandom % 3)
        0: begin px[i] = 16'($urandom % 16);  py[i] = 16'($urandom % 16);  end
        1: begin px[i] = 16'($urandom % 256); py[i] = 16'($urandom % 256); end
        default: begin px[i] = 16'($urandom) | 16'h0100; py[i] = 16'($urandom); end
      endcase
    end
    begin
      int i;
      i = 0;
      while (i < NPAIR) begin
        @(negedge sys_clk);
        #1;
        // razor stall: hold the inputs over the edge that corrects the error
        if (er) continue;
        if (!xy_ready) begin
          n_backpressure++;
          xy_valid = 0;
          continue;
        end
        if (i % 13 == 5 && (x != px[i] || y != py[i] || !xy_valid)) begin
          // late arrival: the pair meant for the next rising edge comes
          // just after it
          @(posedge sys_clk);
          #1;
          n_late++;
        end
        x = px[i]; y = py[i]; xy_valid = 1;
        i++;
      end
      do begin @(negedge sys_clk); #1; end while (er);
      xy_valid = 0; xy_flush = 1;
      repeat (3) @(negedge sys_clk);
      do begin @(negedge sys_clk); #1; end while (er);
      xy_flush = 0;
      repeat (20000) begin
        @(negedge sys_clk);
        if (ios_empty && n_ops > 0) break;
      end
      repeat (100) @(negedge sys_clk);
    end
    for (int t = 0; t < NPAIR; t++) begin
      checks++;
      if (seen[t] != 1) fail($sformatf("pair %0d came back %0d times", t, seen[t]));
    end

    // ---- mechanism coverage
    $display("precision modes 16:%0d 8:%0d 4:%0d  even:%0d odd:%0d bypass:%0d",
             n_prec[PREC_16], n_prec[PREC_8], n_prec[PREC_4], n_even, n_odd, n_bypass);
    $display("late pairs:%0d razor errors:%0d back-pressure cycles:%0d partial patterns:%0d",
             n_late, n_razor, n_backpressure, n_partial);
    $display("results:%0d precision groups:%0d frequency changes:%0d", n_ops, n_groups, freq_changes);
    checks++; if (n_prec[PREC_16] == 0 || n_prec[PREC_8] == 0 || n_prec[PREC_4] == 0) fail("a precision mode never ran");
    checks++; if (n_even == 0 || n_odd == 0) fail("even or odd length never ran");
    checks++; if (n_bypass == 0) fail("bypass never ran");
    checks++; if (n_razor == 0) fail("no razor error");
    checks++; if (n_backpressure == 0) fail("no back-pressure");
    checks++; if (n_partial == 0) fail("no partial pattern");
    checks++; if (freq_changes == 0) fail("no frequency change");
    checks++; if (n_groups < 2) fail("no precision group change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] sel_codes [4] = '{3'd0, 3'd1, 3'd4, 3'd7};
endmodule
