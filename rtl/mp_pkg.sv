// mp_pkg: types and constants shared by the multiprecision FIR filter and its
// operand scheduler.
//
// Precision mode encoding (2 bits, the filter's "con" control):
//   2'b11 : four independent 4x4 products (four lanes of 4-bit operands)
//   2'b10 : one 16x16 product
//   2'b01 : two independent 8x8 products (two lanes of 8-bit operands)
//   2'b00 : reserved, treated as 16x16
// The pairing of 2'b11 with the 4-bit mode and 2'b10 with the 16-bit mode
// follows the published simulation traces of the two filter configurations;
// the 8-bit code and the handling of 2'b00 are this design's choice.
//
// A 16-bit word carries one 16-bit operand, two 8-bit operands (lane 0 in
// bits 7:0) or four 4-bit operands (lane 0 in bits 3:0). Products are packed
// the same way into 32 bits: one 32-bit, two 16-bit or four 8-bit lanes.
package mp_pkg;

  typedef enum logic [1:0] {
    PREC_RSVD = 2'b00,
    PREC_8    = 2'b01,
    PREC_16   = 2'b10,
    PREC_4    = 2'b11
  } prec_e;

  // Tag attached by the operand scheduler to every operand pair it accepts.
  localparam int unsigned TAG_W = 8;
  // Width of a frequency code of the DFS unit (three control bits).
  localparam int unsigned FCODE_W = 3;

  // One 16-bit data pattern as stored in the scheduler buffer.
  typedef struct packed {
    logic [15:0]           a;      // packed multiplicand lanes
    logic [15:0]           b;      // packed multiplier lanes
    logic [3:0]            lanes;  // which lanes hold a real operand pair
    logic [3:0][TAG_W-1:0] tags;   // tag of the operand pair in each lane
    prec_e                 prec;   // precision of every lane
    logic [FCODE_W-1:0]    fcode;  // DFS code the pattern is processed at
  } pattern_t;

  // Number of lanes used by a precision mode.
  function automatic int unsigned prec_lanes(prec_e p);
    case (p)
      PREC_4:  return 4;
      PREC_8:  return 2;
      default: return 1;
    endcase
  endfunction

endpackage
