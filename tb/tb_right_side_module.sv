// tb_right_side_module: self-checking test of the filter's end module.
// With random middle coefficient, samples and incoming right-going sums in
// every precision mode, checks the odd setting (output = incoming sum +
// product, one step later) and the even setting (product added twice, the
// incoming sum delayed by one extra step), lane by lane.
module tb_right_side_module;
  import mp_pkg::*;
  localparam int SEG = 13, AW = 4 * SEG;
  logic clk = 0, rst_n = 0;
  logic ce, coef_shift, evenodd;
  prec_e prec;
  logic [15:0] coef_sin, coef_sout, ktapin;
  logic [AW-1:0] nkaddin, kaddout;
  int checks = 0, failures = 0;

  right_side_module #(.SEG(SEG)) dut (.*);

  always #5 clk = ~clk;

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
    logic [AW-1:0] r_m, ek;
    prec_e modes [3] = '{PREC_16, PREC_8, PREC_4};
    ce = 0; coef_shift = 0; coef_sin = 0; ktapin = 0; nkaddin = 0; prec = PREC_16; evenodd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      coef = 16'($urandom);
      coef_sin = coef; coef_shift = 1;
      @(posedge clk); #1;
      coef_shift = 0;
      checks++;
      if (coef_sout !== coef) begin failures++; $display("FAIL coef shift"); end
      for (int eo = 0; eo < 2; eo++) foreach (modes[m]) begin
        prec = modes[m];
        evenodd = eo[0];
        r_m = '0;
        // clear the internal register with a step of zero inputs
        @(negedge clk); ktapin = 0; nkaddin = 0; ce = 1;
        @(posedge clk);
        for (int i = 0; i < 20; i++) begin
          @(negedge clk);
          ktapin  = 16'($urandom);
          nkaddin = {$urandom, $urandom} & {AW{1'b1}};
          ce = ($urandom % 4 != 0);
          if (ce) begin
            if (evenodd) begin
              ek  = mac(prec, ktapin, coef, r_m);
              r_m = mac(prec, ktapin, coef, nkaddin);
            end else ek = mac(prec, ktapin, coef, nkaddin);
          end else ek = kaddout;
          @(posedge clk); #1;
          checks++;
          if (kaddout !== ek) begin
            failures++; $display("FAIL evenodd=%0d prec=%0d: %h vs %h", evenodd, prec, kaddout, ek);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
