// ios: input operands scheduler.
//
// Reorganises a stream of mixed-precision operand pairs so that
// same-precision operands are processed together. Pipeline:
//   range_detector (combinational)  -> class of each pair (4, 8 or 16 bits)
//   pattern_engine (1 cycle)        -> 16-bit patterns of 1, 2 or 4 pairs
//   ios_buffer                      -> per-precision queues, read group by group
// Every accepted pair gets the next value of an 8-bit tag counter, starting at
// 0 after reset, so results that leave out of order can be matched to their
// operands.
//
// Interface: in_valid/a/b deliver a pair, which is always taken. in_ready
// falls while fewer than five entries are free in some buffer queue, which
// leaves room for the pairs and patterns in flight: a producer that stops
// within two cycles of in_ready falling never overflows the buffer. flush
// emits partly filled patterns when no pair arrives. head_valid/head show
// the next pattern, head_pop takes it. A pair reaches the buffer
// head two cycles after it is taken at the earliest.
// The three sub-blocks and their order follow the document; the tags, flush
// and handshake are this design's choices.
module ios
  import mp_pkg::*;
#(
  parameter int unsigned        DEPTH    = 16,
  parameter logic [FCODE_W-1:0] FCODE_16 = 3'd7,
  parameter logic [FCODE_W-1:0] FCODE_8  = 3'd3,
  parameter logic [FCODE_W-1:0] FCODE_4  = 3'd1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [15:0]      a,
  input  logic [15:0]      b,
  input  logic             flush,
  output logic             in_ready,
  output logic [TAG_W-1:0] next_tag,
  output logic             head_valid,
  output pattern_t         head,
  input  logic             head_pop,
  output logic             empty
);

  prec_e      in_prec;
  logic       pat_valid;
  pattern_t   pat;
  logic       buf_empty;
  logic       take;

  range_detector u_range (.a(a), .b(b), .prec(in_prec));

  assign take = in_valid;

  pattern_engine #(
    .FCODE_16(FCODE_16), .FCODE_8(FCODE_8), .FCODE_4(FCODE_4)
  ) u_pattern (
    .clk(clk), .rst_n(rst_n),
    .in_valid(take), .in_prec(in_prec), .a(a), .b(b), .tag(next_tag),
    .flush(flush),
    .out_valid(pat_valid), .out(pat)
  );

  ios_buffer #(.DEPTH(DEPTH), .RESERVE(4)) u_buffer (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(pat_valid), .wr_data(pat), .space_ok(in_ready),
    .rd_valid(head_valid), .rd_data(head), .rd_pop(head_pop),
    .empty(buf_empty)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    next_tag <= '0;
    else if (take) next_tag <= next_tag + 1'b1;
  end

  assign empty = buf_empty && !pat_valid;

endmodule
