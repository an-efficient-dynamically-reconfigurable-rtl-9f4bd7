// tb_pattern_engine: self-checking test of the pattern generation engine.
// Feeds random operand pairs of all three precisions, with idle and flush
// cycles, and checks every pattern (operands per lane, lane mask, tags,
// precision, DFS code) and the cycle it appears in against a model that
// keeps its own lists of waiting 8-bit and 4-bit pairs.
module tb_pattern_engine;
  import mp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, flush;
  prec_e in_prec;
  logic [15:0] a, b;
  logic [TAG_W-1:0] tag;
  logic out_valid;
  pattern_t out;
  int checks = 0, failures = 0;
  int n16 = 0, n8 = 0, n4 = 0, nflush = 0;

  pattern_engine #(.FCODE_16(3'd7), .FCODE_8(3'd3), .FCODE_4(3'd1)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_prec(in_prec), .a(a), .b(b),
    .tag(tag), .flush(flush), .out_valid(out_valid), .out(out));

  always #5 clk = ~clk;

  typedef struct { logic [15:0] a, b; logic [TAG_W-1:0] t; } pair_t;
  pair_t w8 [$];
  pair_t w4 [$];

  function automatic pattern_t make(prec_e p, pair_t q [$]);
    pattern_t r;
    int sh;
    r = '0;
    r.prec  = p;
    r.fcode = (p == PREC_4) ? 3'd1 : (p == PREC_8) ? 3'd3 : 3'd7;
    sh = (p == PREC_4) ? 4 : (p == PREC_8) ? 8 : 16;
    foreach (q[i]) begin
      for (int k = 0; k < sh; k++) begin
        r.a[sh*i + k] = q[i].a[k];
        r.b[sh*i + k] = q[i].b[k];
      end
      r.lanes[i] = 1'b1;
      r.tags[i]  = q[i].t;
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
    pattern_t exp;
    logic exp_v;
    pair_t pr;
    pair_t one [$];
    in_valid = 0; flush = 0; a = 0; b = 0; tag = 0; in_prec = PREC_16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 5 != 0);
      flush    = ($urandom % 6 == 0);
      case ($urandom % 3)
        0: begin in_prec = PREC_4;  a = 16'($urandom % 16);  b = 16'($urandom % 16);  end
        1: begin in_prec = PREC_8;  a = 16'($urandom % 256); b = 16'($urandom % 256); end
        default: begin in_prec = PREC_16; a = 16'($urandom); b = 16'($urandom); end
      endcase
      tag = TAG_W'(i);
      pr = '{a, b, tag};
      exp_v = 0; exp = '0;
      if (in_valid) begin
        case (in_prec)
          PREC_4: begin
            w4.push_back(pr);
            if (w4.size() == 4) begin exp = make(PREC_4, w4); exp_v = 1; w4.delete(); n4++; end
          end
          PREC_8: begin
            w8.push_back(pr);
            if (w8.size() == 2) begin exp = make(PREC_8, w8); exp_v = 1; w8.delete(); n8++; end
          end
          default: begin
            one.delete(); one.push_back(pr);
            exp = make(PREC_16, one); exp_v = 1; n16++;
          end
        endcase
      end else if (flush) begin
        if (w8.size() != 0)      begin exp = make(PREC_8, w8); exp_v = 1; w8.delete(); nflush++; end
        else if (w4.size() != 0) begin exp = make(PREC_4, w4); exp_v = 1; w4.delete(); nflush++; end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_v) begin failures++; $display("FAIL valid at %0d: %b vs %b", i, out_valid, exp_v); end
      else if (exp_v) begin
        checks++;
        if (out !== exp) begin failures++; $display("FAIL pattern at %0d: %h vs %h", i, out, exp); end
      end
    end
    checks++;
    if (n16 == 0 || n8 == 0 || n4 == 0 || nflush == 0) begin failures++; $display("FAIL not all kinds seen"); end
    $display("patterns 16:%0d 8:%0d 4:%0d flushed:%0d", n16, n8, n4, nflush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
