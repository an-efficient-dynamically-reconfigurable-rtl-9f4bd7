// right_side_module: end module of the symmetric transposed FIR filter.
//
// Turns the right-going accumulation chain back into the left-going one and
// supplies the middle tap(s). It multiplies the sample by its own (middle)
// coefficient and:
//   odd length  (evenodd = 0): kaddout <= nkaddin + p        (middle tap once)
//   even length (evenodd = 1): r       <= nkaddin + p
//                              kaddout <= r + p              (middle tap twice)
// so an otherwise identical filter is one tap longer in the even setting.
// With M active rMAC units of coefficients c0..c(M-1) and middle coefficient
// cR the whole filter's impulse response, in ce-steps after one step of
// latency, is c0..c(M-1), cR, c(M-1)..c0 (odd, 2M+1 taps) or
// c0..c(M-1), cR, cR, c(M-1)..c0 (even, 2M+2 taps).
// Registers advance when ce is high; the coefficient register loads coef_sin
// on every clock edge with coef_shift high, as in rmac.
// The multiplier, the two adders, the internal register and the even/odd
// selection by two multiplexers follow the document's block diagram; which
// value of evenodd means even, and gating the product into the internal
// adder only in the even setting, are this design's reading of it.
module right_side_module
  import mp_pkg::*;
#(
  parameter int unsigned SEG = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  prec_e            prec,
  input  logic             evenodd,
  input  logic             coef_shift,
  input  logic [15:0]      coef_sin,
  output logic [15:0]      coef_sout,
  input  logic [15:0]      ktapin,
  input  logic [4*SEG-1:0] nkaddin,
  output logic [4*SEG-1:0] kaddout
);

  logic [15:0]      coef;
  logic [31:0]      prod;
  logic [4*SEG-1:0] prod_acc;
  logic [4*SEG-1:0] prod_gated;
  logic [4*SEG-1:0] r;
  logic [4*SEG-1:0] rsum;
  logic [4*SEG-1:0] mux_out;
  logic [4*SEG-1:0] ksum;

  assign coef_sout = coef;

  mp_mult u_mult (.a(ktapin), .b(coef), .prec(prec), .p(prod));
  prod_to_acc #(.SEG(SEG)) u_map (.p(prod), .prec(prec), .acc(prod_acc));

  assign prod_gated = evenodd ? prod_acc : '0;
  assign mux_out    = evenodd ? r : nkaddin;

  seg_adder #(.SEG(SEG)) u_radd (.a(nkaddin),  .b(prod_gated), .prec(prec), .s(rsum));
  seg_adder #(.SEG(SEG)) u_kadd (.a(mux_out),  .b(prod_acc),   .prec(prec), .s(ksum));

  always_ff @(posedge clk) begin
    if (!rst_n)          coef <= '0;
    else if (coef_shift) coef <= coef_sin;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r       <= '0;
      kaddout <= '0;
    end else if (ce) begin
      r       <= evenodd ? rsum : '0;
      kaddout <= ksum;
    end
  end

endmodule
