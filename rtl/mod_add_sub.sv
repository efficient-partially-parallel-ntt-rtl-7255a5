// mod_add_sub: modular reduction unit that follows the butterfly adder or
// subtractor of an NTT processing element.
//
// With both operands already in [0, q), the raw sum lies in [0, 2q) and the
// raw difference in (-q, q).  One conditional correction (subtract q from the
// sum, add q to a negative difference) brings the result back into [0, q).
// SUB = 0 selects a + b, SUB = 1 selects a - b.  Purely combinational.
//
// The processing element of the design uses two of these and one
// barrett_reduce, the three reduction units of each PE.  The correction
// scheme is this design's choice; only the unit's role is given.
module mod_add_sub #(
  parameter int unsigned Q   = ntt_pkg::NTT_Q,
  parameter int unsigned DW  = ntt_pkg::NTT_DW,
  parameter bit          SUB = 1'b0
) (
  input  logic [DW-1:0] a,   // operand, 0 <= a < Q
  input  logic [DW-1:0] b,   // operand, 0 <= b < Q
  output logic [DW-1:0] r    // (a + b) mod Q or (a - b) mod Q
);
  localparam logic [DW:0] QW = (DW+1)'(Q);

  logic [DW:0]   raw;    // one extra bit for the carry or the borrow
  logic [DW-1:0] fixed;

  always_comb begin
    if (SUB) begin
      raw   = {1'b0, a} - {1'b0, b};
      fixed = DW'(raw[DW] ? raw + QW : raw);     // borrow: add q back
    end else begin
      raw   = {1'b0, a} + {1'b0, b};
      fixed = DW'((raw >= QW) ? raw - QW : raw); // at most one q too large
    end
    r = fixed;
  end
endmodule
