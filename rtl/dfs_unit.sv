// dfs_unit: dynamic frequency scaling unit.
//
// Sets the operating rate of the datapath to F_STEP_MHZ * (code + 1) from a
// reference clock of F_REF_MHZ, i.e. 5, 10, ... 40 MHz from 50 MHz for the
// three-bit code. The rate is delivered as a clock enable `ce`, one reference
// cycle wide: a phase accumulator adds F_STEP_MHZ*(code+1) every reference
// cycle and pulses `ce` when it passes F_REF_MHZ. For rates that divide the
// reference evenly the pulses are evenly spaced; otherwise they average to the
// exact rate. A new code takes effect on the next reference cycle.
// The 5 MHz step, the three control bits and the 50 MHz reference follow the
// document. The document also states a 5-50 MHz range, which three bits at
// 5 MHz per step cannot reach; this design keeps the three bits (5-40 MHz),
// and CODE_W = 4 with codes up to 9 gives the full range. Producing the rate
// as a clock enable rather than a separate clock is this design's choice.
module dfs_unit #(
  parameter int unsigned CODE_W     = 3,
  parameter int unsigned F_REF_MHZ  = 50,
  parameter int unsigned F_STEP_MHZ = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code,
  output logic              ce
);

  localparam int unsigned ACC_W = $clog2(2 * F_REF_MHZ + 1) + 1;

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] inc;
  logic [ACC_W-1:0] sum;

  always_comb begin
    inc = ACC_W'(F_STEP_MHZ * (32'(code) + 1));
    if (inc > ACC_W'(F_REF_MHZ)) inc = ACC_W'(F_REF_MHZ);
    sum = acc + inc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      ce  <= 1'b0;
    end else if (sum >= ACC_W'(F_REF_MHZ)) begin
      acc <= sum - ACC_W'(F_REF_MHZ);
      ce  <= 1'b1;
    end else begin
      acc <= sum;
      ce  <= 1'b0;
    end
  end

endmodule
