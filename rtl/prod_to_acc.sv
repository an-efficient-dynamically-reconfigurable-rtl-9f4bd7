// prod_to_acc: places a packed multiprecision product into the lane layout of
// the filter accumulator (four segments of SEG bits, SEG >= 8).
//   16-bit mode: the 32-bit product, zero-extended to 4*SEG bits
//   8-bit mode : 16-bit lane k at bit 2*SEG*k, zero-extended to 2*SEG bits
//   4-bit mode : 8-bit lane k at bit SEG*k, zero-extended to SEG bits
// The spare bits of every lane are guard bits for the filter sum. Bits that
// no mode fills (the top five at the default SEG) are constant zero, and the
// lowest eight bits are p[7:0] in every mode.
// Combinational; this layout is this design's choice.
module prod_to_acc
  import mp_pkg::*;
#(
  parameter int unsigned SEG = 13
) (
  input  logic [31:0]      p,
  input  prec_e            prec,
  output logic [4*SEG-1:0] acc
);

  always_comb begin
    acc = '0;
    case (prec)
      PREC_4:
        for (int i = 0; i < 4; i++) acc[SEG*i +: 8] = p[8*i +: 8];
      PREC_8:
        for (int i = 0; i < 2; i++) acc[2*SEG*i +: 16] = p[16*i +: 16];
      default:
        acc[31:0] = p;
    endcase
  end

endmodule
