// tb_dfs_unit: self-checking test of the DFS clock-enable generator.
// For every three-bit code, counts enables over 1000 reference cycles of a
// 50 MHz reference and expects (code + 1) * 5 MHz / 50 MHz * 1000 of them;
// for codes whose rate divides 50 MHz the enables must be evenly spaced.
module tb_dfs_unit;
  logic clk = 0, rst_n = 0;
  logic [2:0] code;
  logic ce;
  int checks = 0, failures = 0;

  dfs_unit dut (.clk(clk), .rst_n(rst_n), .code(code), .ce(ce));

  always #10 clk = ~clk;  // 50 MHz reference

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, last, gap;
    code = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      code = 3'(c);
      repeat (20) @(posedge clk);  // let the new code settle in
      n = 0; last = -1; gap = -1;
      for (int i = 0; i < 1000; i++) begin
        @(posedge clk); #1;
        if (ce) begin
          n++;
          if (last >= 0 && (50 % (5 * (c + 1))) == 0) begin
            checks++;
            if (i - last != 50 / (5 * (c + 1))) begin
              failures++; $display("FAIL code %0d gap %0d", c, i - last);
            end
          end
          last = i;
        end
      end
      checks++;
      if (n != (c + 1) * 100) begin failures++; $display("FAIL code %0d: %0d enables", c, n); end
      else $display("code %0d -> %0d MHz", c, n * 50 / 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
