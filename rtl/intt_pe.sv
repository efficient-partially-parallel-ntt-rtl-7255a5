// intt_pe: radix-2 decimation-in-time processing element of the inverse
// transform.
//
// For an input pair (x, y) and inverse twiddle factor v it computes
//     t = (y * v) mod q
//     a = (x + t) mod q
//     b = (x - t) mod q
// which undoes the forward DIF butterfly up to a factor of two
// (x = a' + b', y = (a' - b') * w with v = w^-1 gives a = 2a', b = 2b');
// the factor 2^n = N of all stages is removed once at the output of the
// inverse transform.  Like the forward PE it has one multiplier, one
// butterfly and three reduction units (barrett_reduce after the multiplier,
// mod_add_sub after the adder and the subtractor).
//
// Timing: results registered once, one clock after the inputs; out_valid is
// in_valid delayed by one clock.  Using the DIT form for the inverse
// transform follows the design; the register and the deferred scaling are
// this design's choices.
module intt_pe #(
  parameter int unsigned Q  = ntt_pkg::NTT_Q,
  parameter int unsigned DW = ntt_pkg::NTT_DW
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] x,          // upper input, < Q
  input  logic [DW-1:0] y,          // lower input, < Q
  input  logic [DW-1:0] v,          // inverse twiddle factor, < Q
  output logic          out_valid,
  output logic [DW-1:0] a,          // (x + y*v) mod Q
  output logic [DW-1:0] b           // (x - y*v) mod Q
);
  logic [2*DW-1:0] prod;
  logic [DW-1:0]   t, sum, diff;

  always_comb prod = (2*DW)'(y) * (2*DW)'(v);

  barrett_reduce #(.Q(Q), .DW(DW))             u_mr_mul (.x(prod), .r(t));
  mod_add_sub    #(.Q(Q), .DW(DW), .SUB(1'b0)) u_mr_add (.a(x), .b(t), .r(sum));
  mod_add_sub    #(.Q(Q), .DW(DW), .SUB(1'b1)) u_mr_sub (.a(x), .b(t), .r(diff));

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    a <= sum;
    b <= diff;
  end
endmodule
