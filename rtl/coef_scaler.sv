// coef_scaler: position-dependent constant multiplication of a coefficient
// stream, the psi weighting of the negative-wrapped convolution.
//
// Multiplying the input coefficients a_i by psi^i (psi a primitive 2N-th
// root of unity, psi^2 = W) before the forward transform, and the result of
// the inverse transform by N^-1 * psi^-i, turns the cyclic product of the
// transforms into the product modulo x^N + 1 without zero padding.
//   INV = 0: out_i = a_i * psi^i mod q
//   INV = 1: out_i = c_i * N^-1 * psi^-i mod q   (N^-1 also removes the
//            factor 2 that every inverse butterfly stage leaves)
// The coefficient index i of each lane and clock follows the processor's
// port order: lane 2k+u at frame clock t carries i = t*(P/2) + k + u*N/2.
// One constant table per lane, computed at elaboration; P modular
// multipliers (multiplier + barrett_reduce).
//
// Timing: one register, latency one clock; frames are N/P consecutive valid
// clocks.  The weighting itself follows the design's polynomial multiplier;
// folding N^-1 into the output weights is this design's choice.
module coef_scaler #(
  parameter int unsigned N   = ntt_pkg::NTT_N,
  parameter int unsigned P   = ntt_pkg::NTT_P,
  parameter int unsigned Q   = ntt_pkg::NTT_Q,
  parameter int unsigned PSI = ntt_pkg::NTT_PSI,
  parameter int unsigned DW  = ntt_pkg::NTT_DW,
  parameter bit          INV = 1'b0
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] din  [P],
  output logic          out_valid,
  output logic [DW-1:0] dout [P]
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LOGP = $clog2(P);
  localparam int unsigned T    = N / P;
  localparam int unsigned TW   = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned NINV = ntt_pkg::modpow(N, Q - 2, Q);   // q prime

  logic [TW-1:0] pos;

  if (T > 1) begin : g_cnt
    always_ff @(posedge clk) begin
      if (rst) pos <= '0;
      else if (in_valid) pos <= pos + 1'b1;   // wraps at T = 2^TW
    end
  end else begin : g_nocnt
    assign pos = '0;
  end

  for (genvar l = 0; l < P; l++) begin : g_lane
    logic [DW-1:0]   rom [T];
    logic [DW-1:0]   f;
    logic [2*DW-1:0] prod;
    logic [DW-1:0]   r;

    for (genvar t = 0; t < T; t++) begin : g_entry
      localparam int unsigned I  = ntt_pkg::stage_index(LOGN, LOGP, 1, t, l / 2, 1'(l % 2));
      localparam int unsigned FW = ntt_pkg::modpow(PSI, I, Q);
      localparam int unsigned FI = ntt_pkg::mulmod(NINV, ntt_pkg::modpow(PSI, 2 * N - I, Q), Q);
      assign rom[t] = DW'(INV ? FI : FW);
    end

    if (T > 1) begin : g_lookup
      assign f = rom[pos];
    end else begin : g_single
      assign f = rom[0];
    end

    always_comb prod = (2*DW)'(din[l]) * (2*DW)'(f);
    barrett_reduce #(.Q(Q), .DW(DW)) u_mr (.x(prod), .r(r));

    always_ff @(posedge clk) dout[l] <= r;
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end
endmodule
