// intt_pp: partially-parallel inverse NTT processor (decimation in time),
// the mirror image of ntt_pp_top.
//
// It takes a spectrum in exactly the order ntt_pp_top produces it (lane l of
// frame clock t holds the value of flow-graph position t*P + l, i.e.
// spectral index bitrev(t*P + l)) and runs the forward data flow backwards:
// inverse stages n, n-1, ..., 1 (intt_stage, DIT butterflies with inverse
// twiddles), and between inverse stage s+1 and s the inverse of the forward
// reordering that sat between stages s and s+1:
//   * rear, s >= m = n-p+1: the same lane permutation (hardwired_shuffle
//     exchanges two lane-number bits, which is its own inverse);
//   * front, s < m: the same delay commutator with L = 2^(m-s-1) (exchanging
//     the pair bit with a time bit is its own inverse).
// The result leaves in the forward processor's input order (lane 2k+u of
// frame clock t holds index t*(P/2) + k + u*N/2), multiplied by N: every
// DIT stage doubles the values, and the caller removes the factor N^-1
// (coef_scaler does it together with the psi^-i weighting).
//
// Timing: frames of N/P consecutive valid clocks; latency N/P - 1 + log2(N)
// clocks, the same as the forward processor.  Using a DIT inverse on
// bit-reversed input follows the design; deriving it as the exact mirror of
// the forward pipeline is this design's reading of "derived by applying the
// other structure".
module intt_pp #(
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
  localparam int unsigned M    = LOGN - LOGP + 1;
  localparam int unsigned T    = N / P;

  // st_in[s] / st_out[s]: words entering / leaving inverse stage s
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

  assign vin[LOGN]   = in_valid;
  assign st_in[LOGN] = in_data;

  for (genvar s = LOGN; s >= 1; s--) begin : g_stage
    intt_stage #(.LOGN(LOGN), .LOGP(LOGP), .S(s), .Q(Q), .W(W), .DW(DW)) u_stage (
      .clk(clk), .rst(rst),
      .in_valid(vin[s]), .din(st_in[s]),
      .out_valid(vout[s]), .dout(st_out[s])
    );

    if (s > 1) begin : g_reorder
      if (s - 1 < M) begin : g_mdc
        logic [P/2-1:0] cv;
        for (genvar k = 0; k < P/2; k++) begin : g_comm
          mdc_commutator #(.DW(DW), .T(T), .L(1 << (M - s))) u_comm (
            .clk(clk), .rst(rst),
            .in_valid(vout[s]), .in_up(st_out[s][2*k]), .in_lo(st_out[s][2*k+1]),
            .out_valid(cv[k]), .out_up(st_in[s-1][2*k]), .out_lo(st_in[s-1][2*k+1])
          );
        end
        assign vin[s-1] = cv[0];
        a_comm_lockstep: assert property (@(posedge clk) disable iff (rst) cv == {(P/2){cv[0]}})
          else $error("intt_pp: commutator valids disagree");
      end else begin : g_wire
        hardwired_shuffle #(.DW(DW), .P(P), .D(LOGN - s + 1)) u_shuffle (
          .din(st_out[s]), .dout(st_in[s-1])
        );
        assign vin[s-1] = vout[s];
      end
    end
  end

  assign out_valid = vout[1];
  assign out_data  = st_out[1];

  initial begin
    assert (N == (1 << LOGN) && P == (1 << LOGP) && P >= 2 && P < N)
      else $error("intt_pp: N and P must be powers of two with 2 <= P < N");
  end
endmodule
