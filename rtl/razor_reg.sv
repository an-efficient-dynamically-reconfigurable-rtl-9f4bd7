// razor_reg: WIDTH-bit razor register with in-situ timing error detection and
// correction by double sampling.
//
// The main flip-flops capture d on the rising clock edge. A shadow register
// captures the same d on the falling edge, half a cycle later, when even a
// late-arriving value has settled. A comparator, sampled on that falling
// edge, raises `error` when the main and shadow values differ; while `error`
// is high, the input mux feeds the shadow value into the main flip-flops, so
// the next rising edge overwrites the wrong value with the correct one and
// `error` clears on the falling edge after it.
//
// Timing: q is valid one rising edge after d, as for a plain register. A
// timing error (d changing between a rising edge and the following falling
// edge) shows on `error` from that falling edge to the next falling edge;
// `error` is meant to be sampled on rising edges. The value q holds during
// that cycle is wrong: the stage that consumes q must
// discard it, and the stage that drives d must hold its value over the next
// rising edge, while the main flip-flops take the shadow value (the whole
// pipeline is delayed by one cycle). The corrected value appears on q one
// cycle late; no value is lost.
// Short-path constraint: a new value must not reach d before the falling edge
// that follows the rising edge launching it, or the shadow register would
// capture the next value instead of the current one.
// Main flip-flop, falling-edge shadow, comparator and restoring mux follow the
// document; the half-cycle shadow timing stands in for the delayed clock of a
// real razor latch, and the synchronous active-low reset is this design's
// choice.
module razor_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             error
);

  logic [WIDTH-1:0] main_q;
  logic [WIDTH-1:0] shadow_q;

  assign q = main_q;

  always_ff @(posedge clk) begin
    if (!rst_n)     main_q <= '0;
    else if (error) main_q <= shadow_q;
    else            main_q <= d;
  end

  // Shadow register and comparator, both on the falling edge: error compares
  // the value the main flip-flops took with the value the shadow takes now,
  // and holds the result until the next falling edge.
  always_ff @(negedge clk) begin
    if (!rst_n) begin
      shadow_q <= '0;
      error    <= 1'b0;
    end else begin
      shadow_q <= d;
      error    <= (main_q != d);
    end
  end

endmodule
