// fir_module: n-order filter module of the partially reconfigurable FIR filter.
//
// N_ORD/2 rMAC units in a row: the sample passes left to right to all of them,
// the left-going chain runs from kaddin (right edge) to kaddout (left edge)
// and the right-going chain from nkaddin (left edge) to nkaddout (right edge),
// one register per unit on each chain. The module therefore adds N_ORD taps
// to the symmetric filter.
//
// bypass selects the bypass module in place of the N_ORD-tap module: both
// chains then pass straight through without delay and the module adds no
// taps, which models swapping the module out by partial reconfiguration
// while the rest of the filter runs. The coefficient shift chain passes
// through the units whatever bypass is.
// Timing as rmac: chain outputs are one ce-step after their inputs per unit.
// The module of n/2 rMACs and the bypass module follow the document; a
// select input in place of FPGA partial reconfiguration is this design's
// choice.
module fir_module
  import mp_pkg::*;
#(
  parameter int unsigned N_ORD = 4,
  parameter int unsigned SEG   = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  prec_e            prec,
  input  logic             bypass,
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

  localparam int unsigned NU = N_ORD / 2;

  logic [15:0]      tap  [NU+1];
  logic [15:0]      cf   [NU+1];
  logic [4*SEG-1:0] kch  [NU+1];  // kch[j] = left-going value leaving unit j
  logic [4*SEG-1:0] nkch [NU+1];  // nkch[j] = right-going value entering unit j

  assign tap[0]  = ktapin;
  assign cf[0]   = coef_sin;
  assign nkch[0] = nkaddin;
  assign kch[NU] = kaddin;

  for (genvar j = 0; j < NU; j++) begin : g_rmac
    rmac #(.SEG(SEG)) u_rmac (
      .clk(clk), .rst_n(rst_n), .ce(ce), .prec(prec),
      .coef_shift(coef_shift), .coef_sin(cf[j]), .coef_sout(cf[j+1]),
      .ktapin(tap[j]), .ktapout(tap[j+1]),
      .kaddin(kch[j+1]), .kaddout(kch[j]),
      .nkaddin(nkch[j]), .nkaddout(nkch[j+1])
    );
  end

  assign ktapout   = tap[NU];
  assign coef_sout = cf[NU];
  assign kaddout   = bypass ? kaddin  : kch[0];
  assign nkaddout  = bypass ? nkaddin : nkch[NU];

endmodule
