// range_detector: operand range detector of the input operands scheduler.
//
// Classifies an operand pair by its effective word length: 4 bits when both
// operands are below 16, 8 bits when both are below 256, 16 bits otherwise.
// The class of a pair is the larger of the two operands' classes, because
// both must fit one lane. Combinational, no latency.
// The three classes follow the document; classifying by the position of the
// highest set bit of unsigned operands is this design's choice. The low four
// bits of each operand do not affect the class and are left unused.
module range_detector
  import mp_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output prec_e       prec
);

  logic [15:4] both;

  assign both = a[15:4] | b[15:4];

  always_comb begin
    if (both == '0)      prec = PREC_4;
    else if (both[15:8] == '0) prec = PREC_8;
    else                       prec = PREC_16;
  end

endmodule
