// mp_mult: 16x16 multiprecision multiplier built of four 8x8 array
// multipliers.
//
// In 16-bit mode the four 8x8 units compute the partial products
// aL*bL, aH*bL, aL*bH and aH*bH, which are shifted and added into one 32-bit
// product. In 8-bit mode only the two diagonal units work (lane 0 = bits 7:0,
// lane 1 = bits 15:8) and the product is {p1[15:0], p0[15:0]}; the operands of
// the two cross units are forced to zero so that unused sections do not
// switch. In 4-bit mode each 8x8 unit multiplies one zero-extended nibble pair
// and the product is {p3[7:0], p2[7:0], p1[7:0], p0[7:0]}.
// Operands are unsigned. Combinational, no latency; the caller registers.
// Splitting a 16x16 unit into four smaller units that either work alone or
// together follows the document; the unsigned arithmetic, the lane layout and
// the operand gating are this design's choices.
module mp_mult
  import mp_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  prec_e       prec,
  output logic [31:0] p
);

  logic [7:0]  ua [4];
  logic [7:0]  ub [4];
  logic [15:0] up [4];

  for (genvar i = 0; i < 4; i++) begin : g_unit
    array_mult8 u_mult (.a(ua[i]), .b(ub[i]), .p(up[i]));
  end

  always_comb begin
    case (prec)
      PREC_4: begin
        for (int i = 0; i < 4; i++) begin
          ua[i] = {4'b0, a[4*i +: 4]};
          ub[i] = {4'b0, b[4*i +: 4]};
        end
      end
      PREC_8: begin
        ua[0] = a[7:0];  ub[0] = b[7:0];
        ua[1] = '0;      ub[1] = '0;
        ua[2] = '0;      ub[2] = '0;
        ua[3] = a[15:8]; ub[3] = b[15:8];
      end
      default: begin
        ua[0] = a[7:0];  ub[0] = b[7:0];
        ua[1] = a[15:8]; ub[1] = b[7:0];
        ua[2] = a[7:0];  ub[2] = b[15:8];
        ua[3] = a[15:8]; ub[3] = b[15:8];
      end
    endcase

    case (prec)
      PREC_4:  p = {up[3][7:0], up[2][7:0], up[1][7:0], up[0][7:0]};
      PREC_8:  p = {up[3], up[0]};
      default: p = {16'b0, up[0]} + ({16'b0, up[1]} << 8)
                 + ({16'b0, up[2]} << 8) + ({16'b0, up[3]} << 16);
    endcase
  end

endmodule
