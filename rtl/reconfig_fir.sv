// reconfig_fir: partially reconfigurable multiprecision symmetric FIR filter.
//
// M_MOD filter modules of N_ORD taps each (N_ORD/2 rMAC units per module) and
// a right side module, in the transposed form: the input sample is broadcast
// to every multiplier, a left-going chain carries partial sums to the output
// at the left end and a right-going chain carries them to the right side
// module, which folds them back. Each multiplier so serves two taps of a
// linear-phase (symmetric) filter. With every module active the filter has
// M_MOD*N_ORD+1 taps (evenodd = 0) or M_MOD*N_ORD+2 taps (evenodd = 1); each
// module set to bypass removes its N_ORD taps while the rest keeps running.
//
// Precision: prec makes the 16-bit sample and coefficient words carry one
// 16-bit, two 8-bit or four 4-bit values (unsigned), so the same hardware runs
// one, two or four independent filters (lane k of the sample with lane k of
// every coefficient). y_out holds their sums in the accumulator layout of
// prod_to_acc: lane width 4*SEG, 2*SEG or SEG bits.
//
// Timing: the filter advances one sample on each clock edge with ce high:
// x_in is taken on that edge and y_out, updated on the same edge, is
//   y = sum_{j=0}^{L-1} h[j] * x[now - j]
// with h the impulse response given in right_side_module (x[now] = sample just
// taken). Coefficients load serially: on each clock edge with coef_shift high,
// coef_in enters unit 0 of module 0 and every coefficient moves one unit to
// the right, ending in the right side module; load the middle coefficient
// first and c0 last (M_MOD*N_ORD/2 + 1 shifts). Change prec, evenodd or bypass
// only with the filter cleared or refilled afterwards.
// The module structure, the rMAC and right side modules, the serial
// coefficient loading and the bypass module follow the document; the module
// count M_MOD, the guard width and the lane-partitioned chains are this
// design's choices.
module reconfig_fir
  import mp_pkg::*;
#(
  parameter int unsigned M_MOD = 5,
  parameter int unsigned N_ORD = 4,
  parameter int unsigned SEG   = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  prec_e            prec,
  input  logic             evenodd,
  input  logic [M_MOD-1:0] bypass,
  input  logic             coef_shift,
  input  logic [15:0]      coef_in,
  input  logic [15:0]      x_in,
  output logic [4*SEG-1:0] y_out
);

  logic [15:0]      tap  [M_MOD+1];
  logic [15:0]      cf   [M_MOD+1];
  logic [4*SEG-1:0] kch  [M_MOD+1];
  logic [4*SEG-1:0] nkch [M_MOD+1];

  assign tap[0]  = x_in;
  assign cf[0]   = coef_in;
  assign nkch[0] = '0;

  for (genvar i = 0; i < M_MOD; i++) begin : g_mod
    fir_module #(.N_ORD(N_ORD), .SEG(SEG)) u_mod (
      .clk(clk), .rst_n(rst_n), .ce(ce), .prec(prec), .bypass(bypass[i]),
      .coef_shift(coef_shift), .coef_sin(cf[i]), .coef_sout(cf[i+1]),
      .ktapin(tap[i]), .ktapout(tap[i+1]),
      .kaddin(kch[i+1]), .kaddout(kch[i]),
      .nkaddin(nkch[i]), .nkaddout(nkch[i+1])
    );
  end

  logic [15:0] unused_coef;

  right_side_module #(.SEG(SEG)) u_right (
    .clk(clk), .rst_n(rst_n), .ce(ce), .prec(prec), .evenodd(evenodd),
    .coef_shift(coef_shift), .coef_sin(cf[M_MOD]), .coef_sout(unused_coef),
    .ktapin(tap[M_MOD]), .nkaddin(nkch[M_MOD]), .kaddout(kch[M_MOD])
  );

  assign y_out = kch[0];

endmodule
