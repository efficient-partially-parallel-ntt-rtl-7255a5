// barrett_reduce: modular reduction unit behind the twiddle multiplier of an
// NTT processing element.
//
// Input x is a product of two residues, so x < q^2 < 2^(2*DW).  Barrett's
// method estimates the quotient as floor(x * MU / 2^(2*DW)) with the
// constant MU = floor(2^(2*DW) / q).  Because x < 2^(2*DW), the error of
// x*MU/2^(2*DW) against x/q is below one, so the estimate is at most one
// below the true quotient: x - qhat*q lies in [0, 2q) and one conditional
// subtraction finishes the job.  Purely combinational; MU is computed from
// the Q parameter at elaboration.
//
// The unit's place (one reduction after the multiplier) follows the
// processing element described for the design; the choice of Barrett over
// Montgomery reduction, which would need operands in Montgomery form, is this
// design's.
module barrett_reduce #(
  parameter int unsigned Q  = ntt_pkg::NTT_Q,
  parameter int unsigned DW = ntt_pkg::NTT_DW
) (
  input  logic [2*DW-1:0] x,   // 0 <= x < 2^(2*DW)
  output logic [DW-1:0]   r    // x mod Q
);
  localparam int unsigned       K   = 2 * DW;
  localparam longint unsigned   MUV = (64'd1 << K) / longint'(Q);
  localparam int unsigned       MW  = $clog2(MUV + 1);
  localparam logic [MW-1:0]     MU  = MW'(MUV);
  localparam logic [DW+1:0]     Q1  = (DW+2)'(Q);

  logic [K+MW-1:0] prod;   // x * MU
  logic [MW-1:0]   qhat;   // quotient estimate, < 2^MW
  logic [DW+1:0]   rem;    // < 2q

  always_comb begin
    prod     = (K+MW)'(x) * (K+MW)'(MU);
    qhat     = MW'(prod >> K);
    // the true remainder is < 2q < 2^(DW+2): the low DW+2 bits suffice
    rem      = (DW+2)'(x) - (DW+2)'(K'(qhat) * K'(Q));
    r        = DW'((rem >= Q1) ? rem - Q1 : rem);
  end
endmodule
