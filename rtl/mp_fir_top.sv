// mp_fir_top: multiprecision, partially reconfigurable FIR filter system with
// razor error detection, an input operands scheduler and dynamic frequency
// scaling.
//
// Clocking: the reference clock clk is halved by a toggle-flip-flop divider
// (clk_div) into sys_clk, which clocks everything else (50 MHz from a 100 MHz
// reference). Two DFS units derive clock enables from sys_clk at
// 5 MHz * (code + 1): one for the filter, set by the external code sel, one
// for the operand path, set automatically by the frequency analyzer.
//
// Filter path: reconfig_fir, precision mode con (see mp_pkg), even/odd length
// evenodd, per-module bypass, serial coefficient loading (coef_shift/coef_in,
// one coefficient per sys_clk edge). A sample fir_x is taken on every sys_clk
// rising edge where fir_ce is high, and fir_y is updated on the same edge.
//
// Operand path: operand pairs x, y with xy_valid (and xy_flush to push out
// partly filled patterns) enter a razor register bank clocked by sys_clk;
// inputs must change only while sys_clk is low, and a change arriving
// while it is high (a late arrival) is a timing error: er rises at the falling
// edge, the wrong value is discarded and the corrected one goes on one
// cycle later. er is also the stall of the producer: while er is high it
// must keep x, y, xy_valid and xy_flush unchanged over the next rising edge. Pairs then go through the input operands scheduler (range
// detection, packing into 16-bit patterns, grouping by precision in the
// buffer). The frequency analyzer sets the operand path's DFS code from the
// code stored with the pattern at the buffer head, and each pattern issues on
// a DFS enable into the multiprecision multiplier. op (registered) shows the
// packed products, valid for one sys_clk cycle with op_valid, together with
// the pattern's precision, lane mask and per-lane operand tags (tags count
// the accepted pairs from 0 after reset). xy_ready says the scheduler can take
// pairs; a producer must stop within two cycles of it falling.
// Latency from the pair to op: razor stage 1 cycle, scheduler at least 2,
// then two DFS enables.
//
// Reset: rst_n resets the divider asynchronously, which holds sys_clk still,
// so a two-flop synchroniser on sys_clk stretches it into sys_rst_n. That
// reset releases on the second sys_clk rising edge after rst_n rises; give
// the operand and filter inputs their idle values by then.
//
// Left unused on purpose: the divider's intermediate taps (only the last stage
// is the system clock), the scheduler's next_tag (the tags come out with every
// pattern) and the DFS code stored in the multiplier's operand register.
//
// Which blocks exist and how they connect follows the document; the split into
// a filter path and an operand path, the clock-enable form of frequency
// scaling and all handshakes are this design's choices.
module mp_fir_top
  import mp_pkg::*;
#(
  parameter int unsigned M_MOD      = 5,
  parameter int unsigned N_ORD      = 4,
  parameter int unsigned SEG        = 13,
  parameter int unsigned IOS_DEPTH  = 16,
  parameter int unsigned SETTLE     = 8,
  parameter int unsigned DIV_STAGES = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               sys_clk,
  // filter path
  input  logic [2:0]         sel,
  input  logic [1:0]         con,
  input  logic               evenodd,
  input  logic [M_MOD-1:0]   mod_bypass,
  input  logic               coef_shift,
  input  logic [15:0]        coef_in,
  input  logic [15:0]        fir_x,
  output logic               fir_ce,
  output logic [4*SEG-1:0]   fir_y,
  // operand path
  input  logic [15:0]        x,
  input  logic [15:0]        y,
  input  logic               xy_valid,
  input  logic               xy_flush,
  output logic               xy_ready,
  output logic               er,
  output logic               op_valid,
  output logic [31:0]        op,
  output logic [1:0]         op_prec,
  output logic [3:0]         op_lanes,
  output logic [4*TAG_W-1:0] op_tags,
  output logic [2:0]         freq_code,
  output logic [15:0]        freq_changes,
  output logic               freq_settling,
  output logic               ios_empty
);

  // ---------------------------------------------------------------- clocks
  logic [DIV_STAGES-1:0] div_taps;

  clk_div #(.STAGES(DIV_STAGES)) u_clk_div (
    .clk(clk), .rst_n(rst_n), .taps(div_taps), .clkdiv(sys_clk)
  );

  // Reset synchroniser. The divider's asynchronous reset holds sys_clk still,
  // so the synchronous resets below would never see an edge during rst_n.
  // sys_rst_n asserts with rst_n and releases on the second sys_clk rising
  // edge after it, so every block sees two reset edges.
  logic [1:0] rst_sync;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end

  logic sys_rst_n;
  assign sys_rst_n = rst_sync[1];


  // ---------------------------------------------------------------- filter
  dfs_unit u_dfs_fir (.clk(sys_clk), .rst_n(sys_rst_n), .code(sel), .ce(fir_ce));

  reconfig_fir #(.M_MOD(M_MOD), .N_ORD(N_ORD), .SEG(SEG)) u_fir (
    .clk(sys_clk), .rst_n(sys_rst_n), .ce(fir_ce), .prec(prec_e'(con)),
    .evenodd(evenodd), .bypass(mod_bypass),
    .coef_shift(coef_shift), .coef_in(coef_in),
    .x_in(fir_x), .y_out(fir_y)
  );

  // ---------------------------------------------------------- operand path
  typedef struct packed {
    logic        valid;
    logic        flush;
    logic [15:0] x;
    logic [15:0] y;
  } xy_word_t;

  xy_word_t razor_d, razor_q;

  assign razor_d = '{valid: xy_valid, flush: xy_flush, x: x, y: y};

  razor_reg #(.WIDTH($bits(xy_word_t))) u_razor (
    .clk(sys_clk), .rst_n(sys_rst_n), .d(razor_d), .q(razor_q), .error(er)
  );

  logic     head_valid;
  pattern_t head;
  logic     issue;
  logic     op_ce;

  ios #(.DEPTH(IOS_DEPTH)) u_ios (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .in_valid(razor_q.valid && !er), .a(razor_q.x), .b(razor_q.y),
    .flush(razor_q.flush && !er),
    .in_ready(xy_ready), .next_tag(),
    .head_valid(head_valid), .head(head), .head_pop(issue), .empty(ios_empty)
  );

  freq_analyzer #(.SETTLE_CYCLES(SETTLE)) u_freq (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .head_valid(head_valid), .head_fcode(head.fcode), .ce(op_ce),
    .issue(issue), .code(freq_code), .settling(freq_settling),
    .changes(freq_changes)
  );

  dfs_unit u_dfs_op (.clk(sys_clk), .rst_n(sys_rst_n), .code(freq_code), .ce(op_ce));

  // Multiplier stage: operand register, multiprecision multiplier, result
  // register, both advancing on the operand path's DFS enable.
  pattern_t    s1;
  logic        s1_valid;
  logic [31:0] prod;

  mp_mult u_mult (.a(s1.a), .b(s1.b), .prec(s1.prec), .p(prod));

  always_ff @(posedge sys_clk) begin
    if (!sys_rst_n) begin
      s1       <= '0;
      s1_valid <= 1'b0;
      op_valid <= 1'b0;
      op       <= '0;
      op_prec  <= '0;
      op_lanes <= '0;
      op_tags  <= '0;
    end else begin
      op_valid <= op_ce && s1_valid;
      if (op_ce) begin
        op       <= prod;
        op_prec  <= s1.prec;
        op_lanes <= s1.lanes;
        op_tags  <= s1.tags;
        s1_valid <= issue;
        if (issue) s1 <= head;
      end
    end
  end

endmodule
