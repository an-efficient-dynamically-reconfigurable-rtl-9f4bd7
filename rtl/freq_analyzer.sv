// freq_analyzer: frequency analyzer of the operand path.
//
// Watches the pattern at the head of the scheduler buffer. When the DFS code
// stored with it differs from the code now in force, it switches the DFS unit
// to the new code and then holds issue for SETTLE_CYCLES reference cycles, the
// time the supply and clock are allowed to settle after a change. Otherwise
// it lets the head pattern issue on the next DFS clock enable.
//
// Interface: head_valid/head_fcode describe the buffer head; ce is the DFS
// clock enable; issue (combinational) is high in a cycle where the head
// pattern is taken; code drives the DFS unit; changes counts frequency
// changes since reset (saturating).
// Reading the frequency stored with each pattern and setting the DFS from it
// follow the document; the settle wait and its length are this design's
// choices (the document only says a change may take more than one cycle).
module freq_analyzer
  import mp_pkg::*;
#(
  parameter int unsigned        SETTLE_CYCLES = 8,
  parameter logic [FCODE_W-1:0] INIT_CODE     = 3'd7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               head_valid,
  input  logic [FCODE_W-1:0] head_fcode,
  input  logic               ce,
  output logic               issue,
  output logic [FCODE_W-1:0] code,
  output logic               settling,
  output logic [15:0]        changes
);

  localparam int unsigned SW = $clog2(SETTLE_CYCLES + 1);

  logic [SW-1:0] wait_q;

  assign settling = (wait_q != '0);
  assign issue    = head_valid && ce && !settling && (head_fcode == code);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code    <= INIT_CODE;
      wait_q  <= '0;
      changes <= '0;
    end else if (settling) begin
      wait_q <= wait_q - 1'b1;
    end else if (head_valid && head_fcode != code) begin
      code   <= head_fcode;
      wait_q <= SW'(SETTLE_CYCLES);
      if (changes != '1) changes <= changes + 1'b1;
    end
  end

endmodule
