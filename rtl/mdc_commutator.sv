// mdc_commutator: feedforward delay-commutator reordering circuit of a
// 2-parallel MDC pipeline, placed between two front stages of the NTT.
//
// The pair leaving stage s differs in one index bit; stage s+1 needs pairs
// that differ in the next lower bit.  That is done with delays and one
// switch:
//   1. the lower path is delayed by L clocks,
//   2. a 2x2 switch exchanges the upper input and the delayed lower word,
//   3. the upper path is delayed by L clocks.
// The switch crosses when bit log2(L) of the frame position of the word on
// the upper input is 1.  Every word therefore leaves exactly L clocks after
// it entered, in the order the next stage needs; 2L registers per
// commutator, and the front of the processor needs N-P of them in total.
//
// Interface: one pair (in_up, in_lo) per clock qualified by in_valid.  A
// frame is T = N/P consecutive valid clocks; gaps are allowed only between
// frames (asserted below).  out_valid/out_up/out_lo follow L clocks later.
// The three-step structure follows the MDC reordering circuit the design
// uses; the frame-position counter that drives the switch is this design's
// own control.
module mdc_commutator #(
  parameter int unsigned DW = ntt_pkg::NTT_DW,
  parameter int unsigned T  = ntt_pkg::NTT_N / ntt_pkg::NTT_P,  // clocks per frame
  parameter int unsigned L  = 32                                 // delay, power of two, <= T/2
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] in_up,
  input  logic [DW-1:0] in_lo,
  output logic          out_valid,
  output logic [DW-1:0] out_up,
  output logic [DW-1:0] out_lo
);
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned LB = $clog2(L);           // switch-control bit

  logic [TW-1:0] pos;        // frame position of the word on in_up
  logic          swap;
  logic [DW-1:0] lo_d;       // lower input after the first delay
  logic [DW-1:0] up_sw;      // switch output towards the upper delay
  logic [L-1:0]  vld_sr;

  always_ff @(posedge clk) begin
    if (rst) pos <= '0;
    else if (in_valid) pos <= (pos == TW'(T - 1)) ? '0 : pos + 1'b1;
  end

  always_comb swap = in_valid && pos[LB];

  delay_line #(.DW(DW), .L(L)) u_lo_delay (.clk(clk), .din(in_lo), .dout(lo_d));

  always_comb begin
    up_sw  = swap ? lo_d  : in_up;
    out_lo = swap ? in_up : lo_d;
  end

  delay_line #(.DW(DW), .L(L)) u_up_delay (.clk(clk), .din(up_sw), .dout(out_up));

  // valid travels with the words
  always_ff @(posedge clk) begin
    if (rst) vld_sr <= '0;
    else     vld_sr <= L'({vld_sr, in_valid});
  end
  assign out_valid = vld_sr[L-1];

  // a frame may not be interrupted once it has started
  a_frame_contiguous: assert property (@(posedge clk) disable iff (rst)
    (pos != '0) |-> in_valid)
    else $error("mdc_commutator: gap inside a frame");
endmodule
