// ntt_pp_top: partially-parallel N-point number theoretic transform
// processor (decimation in frequency), P samples per clock.
//
// It computes A_i = sum_j a_j W^(ij) mod q for a frame of N coefficients
// that arrives as N/P clocks of P words.  There are n = log2(N) stages of
// P/2 radix-2 PEs (ntt_stage).  Between stage s and s+1 the words are
// reordered so that the next stage sees pairs differing in index bit n-s-1:
//   * front, s < m = n-p+1: the P lane pairs form P/2 independent 2-parallel
//     MDC pipelines, and each reordering is a delay commutator
//     (mdc_commutator) with delay L = 2^(m-s-1);
//   * rear, s >= m: the partners already arrive in the same clock and a
//     fixed lane permutation (hardwired_shuffle) pairs them up.
// For N = 512, P = 8 that is 9 stages of 4 PEs, commutators with delays
// 32, 16, 8, 4, 2, 1 in each of the 4 MDC pipelines (504 delay words), and 2
// hardwired shuffles.
//
// Input order (cycle t = 0..N/P-1 of the frame, lane 2k+u):
//     in_data[2k+u] = a[t*(P/2) + k + u*N/2]
// i.e. MDC k takes the coefficients i with i mod (P/2) = k, lower lanes the
// second half of the polynomial.
// Output order: natural order of the flow graph, lane l of output cycle t
// carries A[bitrev_n(t*P + l)] (DIF output is bit-reversed).
//
// Timing: frames of N/P consecutive valid clocks, back to back or with gaps
// between them; out_valid marks the output frames.  Latency from the first
// input word to the first output word is N/P - 1 clocks of reordering delay
// plus one register per stage: N/P - 1 + log2(N) clocks (72 for 512/8).
// Structure, stage count, PE count and delays follow the design; the lane
// numbering, the valid-based framing and the PE output registers are this
// design's choices.
module ntt_pp_top #(
  parameter int unsigned N  = ntt_pkg::NTT_N,
  parameter int unsigned P  = ntt_pkg::NTT_P,
  parameter int unsigned Q  = ntt_pkg::NTT_Q,
  parameter int unsigned W  = ntt_pkg::NTT_W,
  parameter int unsigned DW = ntt_pkg::NTT_DW
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] in_data  [P],
  output logic          out_valid,
  output logic [DW-1:0] out_data [P]
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LOGP = $clog2(P);
  localparam int unsigned M    = LOGN - LOGP + 1;  // last stage of the MDC front
  localparam int unsigned T    = N / P;

  // st_in[s] / st_out[s]: words entering / leaving stage s (index 0 unused)
  logic [DW-1:0] st_in  [LOGN+1][P];
  logic [DW-1:0] st_out [LOGN+1][P];
  logic          vin    [LOGN+1];
  logic          vout   [LOGN+1];

  assign vin[0] = 1'b0;
  assign vout[0] = 1'b0;
  for (genvar l = 0; l < P; l++) begin : g_unused
    assign st_in[0][l]  = '0;
    assign st_out[0][l] = '0;
  end

  assign vin[1]   = in_valid;
  assign st_in[1] = in_data;

  for (genvar s = 1; s <= LOGN; s++) begin : g_stage
    ntt_stage #(.LOGN(LOGN), .LOGP(LOGP), .S(s), .Q(Q), .W(W), .DW(DW)) u_stage (
      .clk(clk), .rst(rst),
      .in_valid(vin[s]), .din(st_in[s]),
      .out_valid(vout[s]), .dout(st_out[s])
    );

    if (s < LOGN) begin : g_reorder
      if (s < M) begin : g_mdc
        logic [P/2-1:0] cv;
        for (genvar k = 0; k < P/2; k++) begin : g_comm
          mdc_commutator #(.DW(DW), .T(T), .L(1 << (M - s - 1))) u_comm (
            .clk(clk), .rst(rst),
            .in_valid(vout[s]), .in_up(st_out[s][2*k]), .in_lo(st_out[s][2*k+1]),
            .out_valid(cv[k]), .out_up(st_in[s+1][2*k]), .out_lo(st_in[s+1][2*k+1])
          );
        end
        assign vin[s+1] = cv[0];
        a_comm_lockstep: assert property (@(posedge clk) disable iff (rst) cv == {(P/2){cv[0]}})
          else $error("ntt_pp_top: commutator valids disagree");
      end else begin : g_wire
        hardwired_shuffle #(.DW(DW), .P(P), .D(LOGN - s)) u_shuffle (
          .din(st_out[s]), .dout(st_in[s+1])
        );
        assign vin[s+1] = vout[s];
      end
    end
  end

  assign out_valid = vout[LOGN];
  assign out_data  = st_out[LOGN];

  initial begin
    assert (N == (1 << LOGN) && P == (1 << LOGP) && P >= 2 && P < N)
      else $error("ntt_pp_top: N and P must be powers of two with 2 <= P < N");
  end
endmodule
