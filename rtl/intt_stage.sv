// intt_stage: one stage of the partially-parallel inverse NTT, P/2 DIT
// processing elements (intt_pe) working side by side on P lanes.
//
// It is the exact mirror of ntt_stage S: the same lanes, the same frame
// positions and the inverse twiddle factors.  Lanes 2k and 2k+1 are the
// upper and lower inputs of PE k; PE k writes x + y*v to lane 2k and
// x - y*v to lane 2k+1, where v = W^-e is the inverse of the factor forward
// stage S used on that pair.  A frame position counter (valid clocks
// modulo N/P) addresses one twiddle table per PE.
//
// Timing: one clock of latency (the PE output register); throughput P words
// per clock with every PE busy in every clock of a frame.  A frame is N/P
// consecutive valid clocks.  The DIT form of the inverse follows the design; the frame
// counter and the table-per-PE layout are this design's choices.
module intt_stage #(
  parameter int unsigned LOGN = $clog2(ntt_pkg::NTT_N),
  parameter int unsigned LOGP = $clog2(ntt_pkg::NTT_P),
  parameter int unsigned S    = 1,                 // stage number, 1..LOGN
  parameter int unsigned Q    = ntt_pkg::NTT_Q,
  parameter int unsigned W    = ntt_pkg::NTT_W,
  parameter int unsigned DW   = ntt_pkg::NTT_DW
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,
  input  logic [DW-1:0] din  [1<<LOGP],
  output logic          out_valid,
  output logic [DW-1:0] dout [1<<LOGP]
);
  localparam int unsigned P  = 1 << LOGP;
  localparam int unsigned T  = 1 << (LOGN - LOGP);
  localparam int unsigned TW = (LOGN - LOGP) > 0 ? LOGN - LOGP : 1;

  logic [TW-1:0] pos;
  logic [P/2-1:0] pe_valid;

  if (T > 1) begin : g_cnt
    always_ff @(posedge clk) begin
      if (rst) pos <= '0;
      else if (in_valid) pos <= pos + 1'b1;   // wraps at T = 2^TW
    end
  end else begin : g_nocnt
    assign pos = '0;
  end

  for (genvar k = 0; k < P/2; k++) begin : g_pe
    logic [DW-1:0] tw;
    ntt_twiddle_rom #(.LOGN(LOGN), .LOGP(LOGP), .S(S), .K(k), .Q(Q), .W(W), .DW(DW), .INV(1'b1))
      u_rom (.pos(pos), .tw(tw));
    intt_pe #(.Q(Q), .DW(DW)) u_pe (
      .clk(clk), .rst(rst), .in_valid(in_valid),
      .x(din[2*k]), .y(din[2*k+1]), .v(tw),
      .out_valid(pe_valid[k]), .a(dout[2*k]), .b(dout[2*k+1])
    );
  end

  assign out_valid = pe_valid[0];

  // all PEs of a stage run in lock step
  a_pe_lockstep: assert property (@(posedge clk) disable iff (rst) pe_valid == {(P/2){pe_valid[0]}})
    else $error("intt_stage: PE valids disagree");
endmodule
