// tb_ios: self-checking test of the input operands scheduler.
// Streams 240 random operand pairs of mixed effective width (4, 8, 16 bits)
// into the scheduler, respecting in_ready, then flushes and drains it with
// random pops. Every pair must come out exactly once, under its tag, in a
// pattern of its own precision class, in its lane, with the pattern's DFS
// code, and same-precision patterns must come out grouped.
module tb_ios;
  import mp_pkg::*;
  localparam int NPAIR = 240;
  logic clk = 0, rst_n = 0;
  logic in_valid, flush, in_ready, head_valid, head_pop, empty;
  logic [15:0] a, b;
  logic [TAG_W-1:0] next_tag;
  pattern_t head;
  int checks = 0, failures = 0;

  ios #(.DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .flush(flush),
    .in_ready(in_ready), .next_tag(next_tag), .head_valid(head_valid), .head(head),
    .head_pop(head_pop), .empty(empty));

  always #5 clk = ~clk;

  logic [15:0] pa [NPAIR];
  logic [15:0] pb [NPAIR];
  int          seen [NPAIR];
  int          groups = 0;

  function automatic prec_e cls(logic [15:0] x, logic [15:0] y);
    if (x < 16 && y < 16)   return PREC_4;
    if (x < 256 && y < 256) return PREC_8;
    return PREC_16;
  endfunction

  task automatic check_pop();
    int w;
    w = (head.prec == PREC_4) ? 4 : (head.prec == PREC_8) ? 8 : 16;
    checks++;
    if (head.fcode != ((head.prec == PREC_4) ? 3'd1 : (head.prec == PREC_8) ? 3'd3 : 3'd7)) begin
      failures++; $display("FAIL fcode");
    end
    for (int l = 0; l < 4; l++) if (head.lanes[l]) begin
      int t;
      t = int'(head.tags[l]);
      checks++;
      if (t >= NPAIR) begin failures++; $display("FAIL bad tag %0d", t); continue; end
      seen[t]++;
      if (cls(pa[t], pb[t]) != head.prec
          || 16'((head.a >> (w*l)) & ((1 << w) - 1)) != pa[t]
          || 16'((head.b >> (w*l)) & ((1 << w) - 1)) != pb[t]) begin
        failures++; $display("FAIL tag %0d lane %0d", t, l);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: pops at random, checks each pattern it takes
  prec_e last_prec = PREC_RSVD;
  always @(negedge clk) head_pop <= rst_n && ($urandom % 3 == 0);
  always @(posedge clk) if (rst_n && head_pop && head_valid) begin
    check_pop();
    if (head.prec != last_prec) groups++;
    last_prec = head.prec;
  end

  initial begin
    int n = 0;
    in_valid = 0; flush = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < NPAIR) begin
      @(negedge clk);
      in_valid = 0;
      if (in_ready && $urandom % 4 != 0) begin
        case ($urandom % 3)
          0: begin a = 16'($urandom % 16);  b = 16'($urandom % 16);  end
          1: begin a = 16'($urandom % 256); b = 16'($urandom % 256); end
          default: begin a = 16'($urandom); b = 16'($urandom); end
        endcase
        pa[n] = a; pb[n] = b;
        in_valid = 1;
        n++;
      end
    end
    @(negedge clk); in_valid = 0; flush = 1;
    repeat (4) @(negedge clk);
    flush = 0;
    repeat (2000) @(negedge clk);
    checks++;
    if (!empty) begin failures++; $display("FAIL not drained"); end
    checks++;
    if (next_tag != TAG_W'(NPAIR)) begin failures++; $display("FAIL tag count %0d", next_tag); end
    for (int t = 0; t < NPAIR; t++) begin
      checks++;
      if (seen[t] != 1) begin failures++; $display("FAIL pair %0d seen %0d times", t, seen[t]); end
    end
    $display("precision groups issued=%0d", groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
