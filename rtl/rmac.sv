// rmac: reconfigurable multiply-accumulate unit of the symmetric transposed
// FIR filter.
//
// The input sample ktapin is passed on unchanged (ktapout) to the next unit
// and multiplied by this unit's coefficient in a multiprecision multiplier.
// The product is added to two accumulation chains at once: the left-going
// chain (kaddin -> register -> kaddout) and the right-going chain
// (nkaddin -> register -> nkaddout). One multiplier thus serves two taps of a
// symmetric filter.
//
// Timing: both chain registers advance on clock edges where ce is high (the
// DFS clock enable); kaddout and nkaddout are one ce-step after their inputs.
// The coefficient register is the stage of a serial-to-parallel shift chain:
// on every clock edge with coef_shift high it loads coef_sin; coef_sout is its
// content, to feed the next unit. Precision mode prec applies to sample,
// coefficient and chains alike (see mp_pkg).
// The unit's structure (pass-through sample, one multiplier, two adders and
// two registers) and the serial coefficient loading follow the document; the
// lane-partitioned chains and the clock enable are this design's choices.
module rmac
  import mp_pkg::*;
#(
  parameter int unsigned SEG = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  prec_e            prec,
  input  logic             coef_shift,
  input  logic [15:0]      coef_sin,
  output logic [15:0]      coef_sout,
  input  logic [15:0]      ktapin,
  output logic [15:0]      ktapout,
  input  logic [4*SEG-1:0] kaddin,
  output logic [4*SEG-1:0] kaddout,
  input  logic [4*SEG-1:0] nkaddin,
  output logic [4*SEG-1:0] nkaddout
);

  logic [15:0]      coef;
  logic [31:0]      prod;
  logic [4*SEG-1:0] prod_acc;
  logic [4*SEG-1:0] ksum;
  logic [4*SEG-1:0] nksum;

  assign ktapout   = ktapin;
  assign coef_sout = coef;

  mp_mult u_mult (.a(ktapin), .b(coef), .prec(prec), .p(prod));
  prod_to_acc #(.SEG(SEG)) u_map (.p(prod), .prec(prec), .acc(prod_acc));
  seg_adder #(.SEG(SEG)) u_kadd  (.a(prod_acc), .b(kaddin),  .prec(prec), .s(ksum));
  seg_adder #(.SEG(SEG)) u_nkadd (.a(prod_acc), .b(nkaddin), .prec(prec), .s(nksum));

  always_ff @(posedge clk) begin
    if (!rst_n)          coef <= '0;
    else if (coef_shift) coef <= coef_sin;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kaddout  <= '0;
      nkaddout <= '0;
    end else if (ce) begin
      kaddout  <= ksum;
      nkaddout <= nksum;
    end
  end

endmodule
