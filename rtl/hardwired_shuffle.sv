// hardwired_shuffle: delay-free reordering between two rear stages of the
// NTT processor.
//
// In the rear stages the pair distance 2^(n-s) is smaller than P/2, so both
// partners of every new pair already arrive in the same clock, only on
// different PEs.  The reordering is then a fixed permutation of the P lanes:
// the word on lane l goes to lane ntt_pkg::shuffle_dest(D, l), where D is the
// index bit stage s pairs on.  Lane 2k+u is the upper (u=0) or lower (u=1)
// input of PE k.  Example, P = 4, D = 1: lanes 1 and 2 are exchanged.
//
// Written out, the permutation exchanges bit 0 and bit D of the lane
// number, so it is its own inverse and the inverse transform (intt_pp)
// uses the same module.
//
// Purely combinational wiring, no registers: zero latency.  That this
// reordering needs no delay follows the design; the lane numbering is this
// design's convention.
module hardwired_shuffle #(
  parameter int unsigned DW = ntt_pkg::NTT_DW,
  parameter int unsigned P  = ntt_pkg::NTT_P,
  parameter int unsigned D  = 2              // pair bit of the stage before, 1 <= D < log2(P)
) (
  input  logic [DW-1:0] din  [P],
  output logic [DW-1:0] dout [P]
);
  for (genvar l = 0; l < P; l++) begin : g_lane
    localparam int unsigned DEST = ntt_pkg::shuffle_dest(D, l);
    assign dout[DEST] = din[l];
  end
endmodule
