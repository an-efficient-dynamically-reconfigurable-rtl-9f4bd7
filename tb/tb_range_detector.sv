// tb_range_detector: self-checking test of the operand range detector.
// Checks the class of random pairs of random effective widths against the
// larger bit length of the two operands.
module tb_range_detector;
  import mp_pkg::*;
  logic [15:0] a, b;
  prec_e prec;
  int checks = 0, failures = 0;

  range_detector dut (.a(a), .b(b), .prec(prec));

  function automatic int bitlen(logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prec_e e;
    int w;
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom) >> ($urandom % 16);
      b = 16'($urandom) >> ($urandom % 16);
      #1;
      w = (bitlen(a) > bitlen(b)) ? bitlen(a) : bitlen(b);
      e = (w <= 4) ? PREC_4 : (w <= 8) ? PREC_8 : PREC_16;
      checks++;
      if (prec != e) begin failures++; $display("FAIL a=%h b=%h prec=%0d", a, b, prec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
