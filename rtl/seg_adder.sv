// seg_adder: lane-partitioned adder for the filter accumulation chains.
//
// The accumulator word is four segments of SEG bits. In 4-bit mode the carry
// is cut between every segment (four independent SEG-bit sums); in 8-bit mode
// it is cut between segments 1 and 2 (two 2*SEG-bit sums); in 16-bit mode the
// word is one 4*SEG-bit sum. Each lane wraps modulo its own width.
// Combinational. The partitioned accumulation is this design's way of
// letting the filter's adders serve one, two or four parallel filters.
module seg_adder
  import mp_pkg::*;
#(
  parameter int unsigned SEG = 13
) (
  input  logic [4*SEG-1:0] a,
  input  logic [4*SEG-1:0] b,
  input  prec_e            prec,
  output logic [4*SEG-1:0] s
);

  always_comb begin
    case (prec)
      PREC_4:
        for (int i = 0; i < 4; i++) s[SEG*i +: SEG] = a[SEG*i +: SEG] + b[SEG*i +: SEG];
      PREC_8:
        for (int i = 0; i < 2; i++) s[2*SEG*i +: 2*SEG] = a[2*SEG*i +: 2*SEG] + b[2*SEG*i +: 2*SEG];
      default:
        s = a + b;
    endcase
  end

endmodule
