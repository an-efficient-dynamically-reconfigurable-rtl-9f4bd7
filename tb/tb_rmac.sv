// tb_rmac: self-checking test of the reconfigurable multiply-accumulate unit.
// Loads random coefficients through the serial input, then applies random
// samples and chain inputs in every precision mode with a random clock
// enable. After each edge both chain registers must equal the lane-wise sums
// (chain input + sample lane * coefficient lane, each lane wrapping at its
// own width) when enabled, and hold otherwise.
module tb_rmac;
  import mp_pkg::*;
  localparam int SEG = 13, AW = 4 * SEG;
  logic clk = 0, rst_n = 0;
  logic ce, coef_shift;
  prec_e prec;
  logic [15:0] coef_sin, coef_sout, ktapin, ktapout;
  logic [AW-1:0] kaddin, kaddout, nkaddin, nkaddout;
  int checks = 0, failures = 0;

  rmac #(.SEG(SEG)) dut (.*);

  always #5 clk = ~clk;

  // lane model: lanes, lane input width and lane accumulator width per mode
  function automatic logic [AW-1:0] mac(prec_e p, logic [15:0] x, logic [15:0] c, logic [AW-1:0] acc);
    int nl, iw, aw;
    logic [AW-1:0] r;
    nl = (p == PREC_4) ? 4 : (p == PREC_8) ? 2 : 1;
    iw = 16 / nl; aw = AW / nl;
    r = '0;
    for (int l = 0; l < nl; l++) begin
      longint unsigned xv, cv, av, s;
      xv = (longint'(x) >> (iw*l)) & ((64'd1 << iw) - 1);
      cv = (longint'(c) >> (iw*l)) & ((64'd1 << iw) - 1);
      av = (acc >> (aw*l)) & ((64'd1 << aw) - 1);
      s  = (av + xv * cv) & ((64'd1 << aw) - 1);
      r  = r | (AW'(s) << (aw*l));
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] coef;
    logic [AW-1:0] ek, enk;
    prec_e modes [3] = '{PREC_16, PREC_8, PREC_4};
    ce = 0; coef_shift = 0; coef_sin = 0; ktapin = 0; kaddin = 0; nkaddin = 0; prec = PREC_16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      // serial load of a new coefficient
      @(negedge clk);
      coef = 16'($urandom);
      coef_sin = coef; coef_shift = 1; ce = 0;
      @(posedge clk); #1;
      coef_shift = 0;
      checks++;
      if (coef_sout !== coef) begin failures++; $display("FAIL coef shift"); end
      foreach (modes[m]) begin
        prec = modes[m];
        for (int i = 0; i < 20; i++) begin
          @(negedge clk);
          ktapin  = 16'($urandom);
          kaddin  = {$urandom, $urandom} & {AW{1'b1}};
          nkaddin = {$urandom, $urandom} & {AW{1'b1}};
          ce = ($urandom % 4 != 0);
          ek  = ce ? mac(prec, ktapin, coef, kaddin)  : kaddout;
          enk = ce ? mac(prec, ktapin, coef, nkaddin) : nkaddout;
          #1;
          checks++;
          if (ktapout !== ktapin) begin failures++; $display("FAIL ktapout"); end
          @(posedge clk); #1;
          checks++;
          if (kaddout !== ek || nkaddout !== enk) begin
            failures++; $display("FAIL prec %0d: k %h/%h nk %h/%h", prec, kaddout, ek, nkaddout, enk);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
