// ntt_pe: radix-2 decimation-in-frequency processing element.
//
// For an input pair (a, b) and twiddle factor w it computes
//     x = (a + b) mod q
//     y = ((a - b) * w) mod q
// with one butterfly (an adder and a subtractor), one DW x DW multiplier and
// three modular reduction units: a mod_add_sub after the adder, a second one
// after the subtractor and a barrett_reduce after the multiplier.
//
// Timing: the reduced results are registered once, so x and y appear one
// clock after a, b and w; out_valid is in_valid delayed by the same clock.
// The structure of the PE (butterfly, multiplier, three reductions) follows
// the design; the single output register is this design's choice.
module ntt_pe #(
  parameter int unsigned Q  = ntt_pkg::NTT_Q,
  parameter int unsigned DW = ntt_pkg::NTT_DW
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] a,          // upper input, < Q
  input  logic [DW-1:0] b,          // lower input, < Q
  input  logic [DW-1:0] w,          // twiddle factor, < Q
  output logic          out_valid,
  output logic [DW-1:0] x,          // (a + b) mod Q
  output logic [DW-1:0] y           // ((a - b) * w) mod Q
);
  logic [DW-1:0]   sum, diff, prod_r;
  logic [2*DW-1:0] prod;

  mod_add_sub    #(.Q(Q), .DW(DW), .SUB(1'b0)) u_mr_add (.a(a), .b(b), .r(sum));
  mod_add_sub    #(.Q(Q), .DW(DW), .SUB(1'b1)) u_mr_sub (.a(a), .b(b), .r(diff));

  always_comb prod = (2*DW)'(diff) * (2*DW)'(w);

  barrett_reduce #(.Q(Q), .DW(DW))             u_mr_mul (.x(prod), .r(prod_r));

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    x <= sum;
    y <= prod_r;
  end
endmodule
