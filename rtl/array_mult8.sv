// array_mult8: unsigned 8x8 array multiplier.
//
// Each row of the array ANDs the multiplicand with one multiplier bit and adds
// the shifted row to the running sum, as in a carry-propagate array
// multiplier. Purely combinational: p = a * b, 16 bits, no latency.
// The four instances inside mp_mult form the multiprecision multiplier; the
// array structure follows the description of the multiplier as an array
// multiplier, the row-by-row ripple form is this design's choice.
module array_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [15:0] rows [8];
  logic [15:0] sums [9];

  always_comb begin
    sums[0] = '0;
    for (int i = 0; i < 8; i++) begin
      rows[i]    = 16'({8'(a & {8{b[i]}})}) << i;
      sums[i+1]  = sums[i] + rows[i];
    end
    p = sums[8];
  end

endmodule
