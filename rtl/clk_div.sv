// clk_div: clock divider made of cascaded divide-by-two toggle stages.
//
// Each stage is a flip-flop whose D input is its own inverted output, so it
// toggles on every rising edge of its input clock and halves the frequency.
// Stage i is clocked by stage i-1 (stage 0 by clk). taps[i] is the input clock
// divided by 2^(i+1); clkdiv is the last stage, divided by 2^STAGES.
// Reset (active low, asynchronous) sets every stage high, the initial state in
// which the document explains the divider; its first rising edge then drives
// clkdiv low. The single toggle stage follows the document, the cascade
// parameter and asynchronous reset are this design's choices.
module clk_div #(
  parameter int unsigned STAGES = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [STAGES-1:0] taps,
  output logic              clkdiv
);

  logic [STAGES:0] stage_clk;

  assign stage_clk[0] = clk;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic q;
    logic din;
    assign din = ~q;
    always_ff @(posedge stage_clk[i] or negedge rst_n) begin
      if (!rst_n) q <= 1'b1;
      else        q <= din;
    end
    assign stage_clk[i+1] = q;
    assign taps[i]        = q;
  end

  assign clkdiv = stage_clk[STAGES];

endmodule
