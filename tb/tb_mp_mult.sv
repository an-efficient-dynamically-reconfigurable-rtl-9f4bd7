// tb_mp_mult: self-checking test of the multiprecision multiplier.
// Drives random and corner-case operands in all precision modes and compares
// every lane with a product computed by the simulator's own multiplication.
module tb_mp_mult;
  import mp_pkg::*;

  logic [15:0] a, b;
  prec_e       prec;
  logic [31:0] p;
  int checks = 0, failures = 0;

  mp_mult dut (.a(a), .b(b), .prec(prec), .p(p));

  function automatic logic [31:0] model(logic [15:0] x, logic [15:0] w, prec_e m);
    logic [31:0] r;
    r = '0;
    case (m)
      PREC_4:  for (int i = 0; i < 4; i++) r[8*i +: 8] = 8'(x[4*i +: 4] * w[4*i +: 4]);
      PREC_8:  for (int i = 0; i < 2; i++) r[16*i +: 16] = 16'(x[8*i +: 8] * w[8*i +: 8]);
      default: r = 32'(x) * 32'(w);
    endcase
    return r;
  endfunction

  task automatic check(logic [15:0] x, logic [15:0] w, prec_e m);
    a = x; b = w; prec = m;
    #1;
    checks++;
    if (p !== model(x, w, m)) begin
      failures++;
      $display("FAIL prec=%0d a=%h b=%h p=%h exp=%h", m, x, w, p, model(x, w, m));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prec_e modes [4] = '{PREC_16, PREC_8, PREC_4, PREC_RSVD};
    foreach (modes[m]) begin
      check(16'hFFFF, 16'hFFFF, modes[m]);
      check(16'h0000, 16'hFFFF, modes[m]);
      check(16'h0001, 16'h0001, modes[m]);
      check(16'h8001, 16'h0180, modes[m]);
      for (int i = 0; i < 500; i++) check(16'($urandom), 16'($urandom), modes[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
