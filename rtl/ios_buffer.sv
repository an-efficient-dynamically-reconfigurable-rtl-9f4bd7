// ios_buffer: buffer RAM of the input operands scheduler.
//
// Holds data patterns grouped by precision: the RAM is split into three
// first-in first-out queues of DEPTH patterns, one each for 16-bit, 8-bit and
// 4-bit patterns, every entry stored with its DFS code. The read side serves
// one precision group at a time: it keeps reading the current group until that
// queue is empty and only then moves on to the next non-empty group (order
// 16 -> 8 -> 4 -> 16). This groups same-precision patterns together, so the
// frequency (and supply) changes only when the group changes.
//
// Interface: wr_valid/wr_data write one pattern per cycle into the queue of
// its precision. rd_valid/rd_data show the head of the current group
// (asynchronous read); rd_pop removes it. space_ok is high while every queue
// has more than RESERVE free entries, so that an upstream pipeline RESERVE
// deep can be stopped in time; a write into a full queue is an error.
// Queue switching takes one cycle after a group runs empty.
// A RAM buffer of same-precision groups stored with their frequencies follows
// the document; the three queues, the depth and the group order are this
// design's choices.
module ios_buffer
  import mp_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned RESERVE = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_valid,
  input  pattern_t wr_data,
  output logic     space_ok,
  output logic     rd_valid,
  output pattern_t rd_data,
  input  logic     rd_pop,
  output logic     empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  pattern_t        mem [3][DEPTH];
  logic [AW-1:0]   wp  [3];
  logic [AW-1:0]   rp  [3];
  logic [AW:0]     cnt [3];
  logic [1:0]      cur;
  logic [1:0]      wq;

  function automatic logic [1:0] queue_of(prec_e p);
    case (p)
      PREC_8:  return 2'd1;
      PREC_4:  return 2'd2;
      default: return 2'd0;
    endcase
  endfunction

  function automatic logic [1:0] next_q(logic [1:0] q);
    return (q == 2'd2) ? 2'd0 : q + 2'd1;
  endfunction

  assign wq       = queue_of(wr_data.prec);
  assign rd_valid = (cnt[cur] != '0);
  assign rd_data  = mem[cur][rp[cur]];
  assign empty    = (cnt[0] == '0) && (cnt[1] == '0) && (cnt[2] == '0);

  always_comb begin
    space_ok = 1'b1;
    for (int q = 0; q < 3; q++)
      if (32'(cnt[q]) + RESERVE >= DEPTH) space_ok = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wq][wp[wq]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < 3; q++) begin
        wp[q]  <= '0;
        rp[q]  <= '0;
        cnt[q] <= '0;
      end
      cur <= '0;
    end else begin
      for (int q = 0; q < 3; q++) begin
        logic w, r;
        w = wr_valid && (wq == 2'(q));
        r = rd_pop && rd_valid && (cur == 2'(q));
        if (w) wp[q] <= (32'(wp[q]) == DEPTH - 1) ? '0 : wp[q] + 1'b1;
        if (r) rp[q] <= (32'(rp[q]) == DEPTH - 1) ? '0 : rp[q] + 1'b1;
        cnt[q] <= cnt[q] + (AW+1)'(w) - (AW+1)'(r);
      end
      // Stay on the current group until it runs empty.
      if (cnt[cur] == '0 || (cnt[cur] == 1 && rd_pop && !(wr_valid && wq == cur))) begin
        if (cnt[next_q(cur)] != '0)               cur <= next_q(cur);
        else if (cnt[next_q(next_q(cur))] != '0)  cur <= next_q(next_q(cur));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid |-> 32'(cnt[wq]) < DEPTH)
    else $error("ios_buffer: write into a full queue");

endmodule
