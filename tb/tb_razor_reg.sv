// tb_razor_reg: self-checking test of the razor register.
// Data normally changes while the clock is low (on time). Some values are
// made to arrive late, just after the rising edge meant to capture them: the test checks that the
// error flag rises for exactly those, that the main register holds the stale
// value in that cycle, and that the correct value appears one cycle later.
// The stream of non-discarded q values must equal the stream of inputs.
module tb_razor_reg;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic error;
  int checks = 0, failures = 0;
  int late_cnt = 0, err_cnt = 0;

  razor_reg #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .error(error));

  always #5 clk = ~clk;

  logic [W-1:0] sent [$];
  logic [W-1:0] got  [$];

  // Consumer: on each rising edge, take q unless error flags it as wrong.
  always @(posedge clk) if (rst_n) begin
    if (error) err_cnt++;
    else got.push_back(q);
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(posedge clk);  // first edge out of reset captures d = 0
    sent.push_back('0);
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      v = W'($urandom);
      if (v == sent[$]) v = v + 1'b1;
      if (i % 7 == 3) begin
        // late arrival: the value meant for this rising edge comes just
        // after it
        @(posedge clk);
        #1 d = v;
        late_cnt++;
        @(negedge clk);
        #1;
        checks++;
        if (!error) begin failures++; $display("FAIL no error for late value %h", v); end
        checks++;
        if (q == v) begin failures++; $display("FAIL main took late value early"); end
        @(posedge clk);
        #1;
        checks++;
        if (q != v) begin failures++; $display("FAIL not corrected: q=%h exp=%h", q, v); end
        @(negedge clk);
        #1;
        checks++;
        if (error) begin failures++; $display("FAIL error did not clear"); end
        // the producer held v over the correcting edge; it goes on from here
        sent.push_back(v);
        continue;
      end else begin
        #2 d = v;
        @(posedge clk);
        @(negedge clk);
      end
      sent.push_back(v);
    end
    repeat (3) @(posedge clk);
    // got holds each value once per cycle it was presented; collapse runs
    begin
      logic [W-1:0] uniq [$];
      foreach (got[i]) if (uniq.size() == 0 || uniq[$] != got[i]) uniq.push_back(got[i]);
      checks++;
      if (uniq.size() != sent.size()) begin
        failures++; $display("FAIL stream length %0d vs %0d", uniq.size(), sent.size());
      end else foreach (sent[i]) begin
        checks++;
        if (uniq[i] != sent[i]) begin failures++; $display("FAIL stream[%0d] %h vs %h", i, uniq[i], sent[i]); end
      end
    end
    checks++;
    if (err_cnt != late_cnt) begin failures++; $display("FAIL errors %0d vs late %0d", err_cnt, late_cnt); end
    $display("late arrivals=%0d errors=%0d", late_cnt, err_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
