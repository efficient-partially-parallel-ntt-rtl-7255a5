// pointwise_mult: coefficient-wise modular product of two transformed
// polynomials, C_i = A_i * B_i mod q, P products per clock.
//
// Both operand streams come from forward transforms running in lock step, so
// lane l of a clock holds the same spectral index in both; the product keeps
// that order and is fed straight to the inverse transform.  Each lane is a
// DW x DW multiplier followed by a barrett_reduce.
//
// Timing: one register, latency one clock; out_valid is in_valid delayed by
// one clock.  The pointwise product follows the design's polynomial
// multiplier; the single register is this design's choice.
module pointwise_mult #(
  parameter int unsigned P  = ntt_pkg::NTT_P,
  parameter int unsigned Q  = ntt_pkg::NTT_Q,
  parameter int unsigned DW = ntt_pkg::NTT_DW
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] a [P],
  input  logic [DW-1:0] b [P],
  output logic          out_valid,
  output logic [DW-1:0] c [P]
);
  for (genvar l = 0; l < P; l++) begin : g_lane
    logic [2*DW-1:0] prod;
    logic [DW-1:0]   r;
    always_comb prod = (2*DW)'(a[l]) * (2*DW)'(b[l]);
    barrett_reduce #(.Q(Q), .DW(DW)) u_mr (.x(prod), .r(r));
    always_ff @(posedge clk) c[l] <= r;
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end
endmodule
