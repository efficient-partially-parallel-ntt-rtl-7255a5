// delay_line: L-word shift-register delay (the "delay elements" / FIFO of a
// reordering circuit).
//
// Every clock the line shifts by one word, so dout is din delayed by exactly
// L clocks.  The line runs freely; the surrounding logic keeps track of which
// words are valid.  L = 0 gives a plain wire.  The register contents are not
// reset: nothing reads a word before a valid sample has been written into it.
module delay_line #(
  parameter int unsigned DW = ntt_pkg::NTT_DW,
  parameter int unsigned L  = 1
) (
  input  logic          clk,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  if (L == 0) begin : g_wire
    assign dout = din;
  end else begin : g_sr
    logic [DW-1:0] sr [L];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < L; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[L-1];
  end
endmodule
