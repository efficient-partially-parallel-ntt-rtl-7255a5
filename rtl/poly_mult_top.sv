// poly_mult_top: NTT-based polynomial multiplier in Z_q[x]/(x^N + 1) built
// around the partially-parallel NTT processor.
//
// c(x) = a(x) * b(x) mod (x^N + 1) is computed as
//     c = psi^-1-weighting( INTT( NTT(psi-weighted a) . NTT(psi-weighted b) ) )
// (negative-wrapped convolution, no zero padding):
//   1. coef_scaler (INV=0) multiplies a_i and b_i by psi^i,
//   2. two forward DIF processors (ntt_pp_top) transform a and b in lock
//      step; their outputs are in bit-reversed spectral order,
//   3. pointwise_mult forms A_i * B_i in that same order,
//   4. the DIT inverse processor (intt_pp) takes the bit-reversed spectrum
//      and returns coefficients in the forward input order, so no
//      bit-reversal circuit is needed anywhere,
//   5. coef_scaler (INV=1) multiplies by N^-1 * psi^-i.
//
// Ports: a_data/b_data carry the coefficients of a and b together, P per
// clock, in the processor's input order (lane 2k+u of frame clock t holds
// index t*(P/2) + k + u*N/2); c_data returns c in the same order.  Frames
// are N/P consecutive valid clocks, back to back or with gaps.
// Latency: 2*(N/P - 1 + log2 N) + 3 clocks (147 for N = 512, P = 8).
// The chain follows the design's overall multiplier structure (DIF forward,
// DIT inverse, psi weighting); two separate forward processors and the
// register stages are this design's choices.
module poly_mult_top #(
  parameter int unsigned N   = ntt_pkg::NTT_N,
  parameter int unsigned P   = ntt_pkg::NTT_P,
  parameter int unsigned Q   = ntt_pkg::NTT_Q,
  parameter int unsigned W   = ntt_pkg::NTT_W,
  parameter int unsigned PSI = ntt_pkg::NTT_PSI,
  parameter int unsigned DW  = ntt_pkg::NTT_DW
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] a_data [P],
  input  logic [DW-1:0] b_data [P],
  output logic          out_valid,
  output logic [DW-1:0] c_data [P]
);
  logic          wa_v, wb_v, fa_v, fb_v, pm_v, it_v;
  logic [DW-1:0] wa [P], wb [P], fa [P], fb [P], pm [P], it [P];

  coef_scaler #(.N(N), .P(P), .Q(Q), .PSI(PSI), .DW(DW), .INV(1'b0)) u_wa (
    .clk, .rst, .in_valid(in_valid), .din(a_data), .out_valid(wa_v), .dout(wa));
  coef_scaler #(.N(N), .P(P), .Q(Q), .PSI(PSI), .DW(DW), .INV(1'b0)) u_wb (
    .clk, .rst, .in_valid(in_valid), .din(b_data), .out_valid(wb_v), .dout(wb));

  ntt_pp_top #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW)) u_ntt_a (
    .clk, .rst, .in_valid(wa_v), .in_data(wa), .out_valid(fa_v), .out_data(fa));
  ntt_pp_top #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW)) u_ntt_b (
    .clk, .rst, .in_valid(wb_v), .in_data(wb), .out_valid(fb_v), .out_data(fb));

  pointwise_mult #(.P(P), .Q(Q), .DW(DW)) u_pm (
    .clk, .rst, .in_valid(fa_v), .a(fa), .b(fb), .out_valid(pm_v), .c(pm));

  intt_pp #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW)) u_intt (
    .clk, .rst, .in_valid(pm_v), .in_data(pm), .out_valid(it_v), .out_data(it));

  coef_scaler #(.N(N), .P(P), .Q(Q), .PSI(PSI), .DW(DW), .INV(1'b1)) u_wc (
    .clk, .rst, .in_valid(it_v), .din(it), .out_valid(out_valid), .dout(c_data));

  // the two forward paths run in lock step; only path a's valid is used
  a_lockstep: assert property (@(posedge clk) disable iff (rst) wa_v == wb_v && fa_v == fb_v)
    else $error("poly_mult_top: forward transforms out of step");
endmodule
