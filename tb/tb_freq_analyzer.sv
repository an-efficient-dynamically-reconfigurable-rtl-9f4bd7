// tb_freq_analyzer: self-checking test of the frequency analyzer.
// Presents a buffer head whose DFS code changes now and then, with a random
// clock enable, and checks that: a pattern only issues when its code is in
// force, on an enable and not while settling; every change of code is
// followed by exactly SETTLE reference cycles without issue; and the change
// counter counts the changes.
module tb_freq_analyzer;
  localparam int SETTLE = 5;
  logic clk = 0, rst_n = 0;
  logic head_valid, ce;
  logic [2:0] head_fcode, code;
  logic issue, settling;
  logic [15:0] changes;
  int checks = 0, failures = 0;
  int exp_changes = 0, issued = 0;
  int quiet = 0;

  freq_analyzer #(.SETTLE_CYCLES(SETTLE), .INIT_CODE(3'd7)) dut (
    .clk(clk), .rst_n(rst_n), .head_valid(head_valid), .head_fcode(head_fcode),
    .ce(ce), .issue(issue), .code(code), .settling(settling), .changes(changes));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] prev_code;
    head_valid = 0; head_fcode = 7; ce = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_code = 7;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      head_valid = ($urandom % 4 != 0);
      if ($urandom % 40 == 0) head_fcode = 3'($urandom);
      ce = ($urandom % 2 == 0);
      #1;
      checks++;
      if (issue !== (head_valid && ce && !settling && head_fcode == code)) begin
        failures++; $display("FAIL issue rule at %0d", i);
      end
      if (issue) issued++;
      @(posedge clk); #1;
      if (code != prev_code) begin
        exp_changes++;
        checks++;
        if (!settling) begin failures++; $display("FAIL no settle after change"); end
        quiet = 0;
        while (settling) begin
          @(negedge clk);
          ce = 1; head_valid = 1;
          #1;
          checks++;
          if (issue) begin failures++; $display("FAIL issue while settling"); end
          @(posedge clk); #1;
          quiet++;
        end
        checks++;
        if (quiet != SETTLE) begin failures++; $display("FAIL settle took %0d", quiet); end
        prev_code = code;
      end
    end
    checks++;
    if (changes != 16'(exp_changes)) begin failures++; $display("FAIL changes %0d vs %0d", changes, exp_changes); end
    checks++;
    if (issued == 0 || exp_changes == 0) begin failures++; $display("FAIL nothing exercised"); end
    $display("changes=%0d issued=%0d", exp_changes, issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
