// tb_clk_div: self-checking test of the cascaded toggle clock divider.
// After reset every stage is high; each stage must toggle on every rising
// edge of the clock before it, so stage i runs at clk / 2^(i+1).
module tb_clk_div;
  localparam int S = 3;
  logic clk = 0, rst_n = 1;
  logic [S-1:0] taps;
  logic clkdiv;
  int checks = 0, failures = 0;
  int n_clk = 0;
  logic [S-1:0] exp_taps;

  clk_div #(.STAGES(S)) dut (.clk(clk), .rst_n(rst_n), .taps(taps), .clkdiv(clkdiv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;  // asynchronous reset needs a falling edge
    #2;
    checks++;
    if (taps !== '1 || clkdiv !== 1'b1) begin failures++; $display("FAIL reset state %b", taps); end
    rst_n = 1;
    for (int i = 1; i <= 200; i++) begin
      #5 clk = 1;
      #1;
      n_clk = i;
      // Stage k starts high and toggles once per rising edge of stage k-1,
      // which rises every 2^k clk edges: after i edges it has toggled
      // floor(i / 2^k) times.
      for (int k = 0; k < S; k++) exp_taps[k] = ((i / (1 << k)) % 2 == 0);
      checks++;
      if (taps !== exp_taps || clkdiv !== exp_taps[S-1]) begin
        failures++;
        $display("FAIL edge %0d taps=%b exp=%b", i, taps, exp_taps);
      end
      #4 clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
