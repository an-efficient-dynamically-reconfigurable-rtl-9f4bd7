// pattern_engine: pattern generation engine of the input operands scheduler.
//
// Collects operand pairs of the same precision into 16-bit data patterns:
// pattern 1 holds one 16-bit pair, pattern 2 two 8-bit pairs, pattern 3 four
// 4-bit pairs. A 16-bit pair leaves at once; 8-bit and 4-bit pairs wait in a
// collection slot until the pattern is full. Each pattern carries the DFS
// code it is to be processed at (FCODE_16/8/4), a lane mask and the tag of
// the pair in each lane.
//
// Interface: in_valid/in_prec/a/b/tag present one classified pair per cycle;
// the caller only asserts in_valid when the buffer can take a pattern.
// flush, sampled only in a cycle without in_valid, emits a partly filled
// 8-bit pattern (or, if none, a partly filled 4-bit pattern) with its unused
// lanes zero and masked off. out_valid/out is registered: a pattern leaves one
// cycle after the pair that completes it.
// Grouping and the three patterns follow the document; the per-precision DFS
// codes (chosen so that all three patterns give the same operand rate), the
// flush and the tag handling are this design's choices.
module pattern_engine
  import mp_pkg::*;
#(
  parameter logic [FCODE_W-1:0] FCODE_16 = 3'd7,
  parameter logic [FCODE_W-1:0] FCODE_8  = 3'd3,
  parameter logic [FCODE_W-1:0] FCODE_4  = 3'd1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  prec_e            in_prec,
  input  logic [15:0]      a,
  input  logic [15:0]      b,
  input  logic [TAG_W-1:0] tag,
  input  logic             flush,
  output logic             out_valid,
  output pattern_t         out
);

  pattern_t p8;   // collection slot for 8-bit pairs
  pattern_t p4;   // collection slot for 4-bit pairs
  logic [1:0] n8; // pairs in p8 (0..1)
  logic [2:0] n4; // pairs in p4 (0..3)

  function automatic pattern_t empty_pattern(prec_e p, logic [FCODE_W-1:0] f);
    pattern_t e;
    e       = '0;
    e.prec  = p;
    e.fcode = f;
    return e;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      p8        <= empty_pattern(PREC_8, FCODE_8);
      p4        <= empty_pattern(PREC_4, FCODE_4);
      n8        <= '0;
      n4        <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        case (in_prec)
          PREC_4: begin
            pattern_t t;
            t = p4;
            t.a[4*n4[1:0] +: 4] = a[3:0];
            t.b[4*n4[1:0] +: 4] = b[3:0];
            t.lanes[n4[1:0]]    = 1'b1;
            t.tags[n4[1:0]]     = tag;
            if (n4 == 3'd3) begin
              out       <= t;
              out_valid <= 1'b1;
              p4        <= empty_pattern(PREC_4, FCODE_4);
              n4        <= '0;
            end else begin
              p4 <= t;
              n4 <= n4 + 3'd1;
            end
          end
          PREC_8: begin
            pattern_t t;
            t = p8;
            t.a[8*n8[0] +: 8] = a[7:0];
            t.b[8*n8[0] +: 8] = b[7:0];
            t.lanes[{1'b0, n8[0]}] = 1'b1;
            t.tags[{1'b0, n8[0]}]  = tag;
            if (n8 == 2'd1) begin
              out       <= t;
              out_valid <= 1'b1;
              p8        <= empty_pattern(PREC_8, FCODE_8);
              n8        <= '0;
            end else begin
              p8 <= t;
              n8 <= n8 + 2'd1;
            end
          end
          default: begin
            pattern_t t;
            t          = empty_pattern(PREC_16, FCODE_16);
            t.a        = a;
            t.b        = b;
            t.lanes[0] = 1'b1;
            t.tags[0]  = tag;
            out        <= t;
            out_valid  <= 1'b1;
          end
        endcase
      end else if (flush) begin
        if (n8 != '0) begin
          out       <= p8;
          out_valid <= 1'b1;
          p8        <= empty_pattern(PREC_8, FCODE_8);
          n8        <= '0;
        end else if (n4 != '0) begin
          out       <= p4;
          out_valid <= 1'b1;
          p4        <= empty_pattern(PREC_4, FCODE_4);
          n4        <= '0;
        end
      end
    end
  end

endmodule
