// tb_fir_module: self-checking test of one n-order filter module (N_ORD = 4,
// two rMAC units) and of its bypass setting.
// Coefficients are loaded serially; random samples and chain inputs are
// applied in every precision mode. With bypass off, the chain outputs must
// follow a model of the two units' registers (left-going chain through unit
// 1 then unit 0, right-going chain through unit 0 then unit 1); with bypass
// on, both chains must pass straight through in the same cycle.
module tb_fir_module;
  import mp_pkg::*;
  localparam int SEG = 13, AW = 4 * SEG;
  logic clk = 0, rst_n = 0;
  logic ce, coef_shift, bypass;
  prec_e prec;
  logic [15:0] coef_sin, coef_sout, ktapin, ktapout;
  logic [AW-1:0] kaddin, kaddout, nkaddin, nkaddout;
  int checks = 0, failures = 0;

  fir_module #(.N_ORD(4), .SEG(SEG)) dut (.*);

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
    logic [15:0] c0, c1;
    logic [AW-1:0] k0, k1, nk0, nk1;
    prec_e modes [3] = '{PREC_16, PREC_8, PREC_4};
    ce = 0; coef_shift = 0; coef_sin = 0; ktapin = 0; kaddin = 0; nkaddin = 0;
    prec = PREC_16; bypass = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    k0 = '0; k1 = '0; nk0 = '0; nk1 = '0;
    for (int r = 0; r < 30; r++) begin
      c1 = 16'($urandom); c0 = 16'($urandom);
      @(negedge clk); coef_sin = c1; coef_shift = 1; ce = 0;
      @(negedge clk); coef_sin = c0;
      @(negedge clk); coef_shift = 0;
      checks++;
      if (coef_sout !== c1) begin failures++; $display("FAIL coefficient chain"); end
      foreach (modes[m]) begin
        for (int i = 0; i < 30; i++) begin
          @(negedge clk);
          prec    = modes[m];
          ktapin  = 16'($urandom);
          kaddin  = {$urandom, $urandom} & {AW{1'b1}};
          nkaddin = {$urandom, $urandom} & {AW{1'b1}};
          bypass  = ($urandom % 5 == 0);
          ce = ($urandom % 4 != 0);
          #1;
          checks++;
          if (bypass) begin
            if (kaddout !== kaddin || nkaddout !== nkaddin) begin failures++; $display("FAIL bypass"); end
          end else if (kaddout !== k0 || nkaddout !== nk1 || ktapout !== ktapin) begin
            failures++; $display("FAIL chains prec=%0d k %h/%h nk %h/%h", prec, kaddout, k0, nkaddout, nk1);
          end
          if (ce) begin
            k0  = mac(prec, ktapin, c0, k1);
            k1  = mac(prec, ktapin, c1, kaddin);
            nk1 = mac(prec, ktapin, c1, nk0);
            nk0 = mac(prec, ktapin, c0, nkaddin);
          end
          @(posedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
