// ntt_twiddle_rom: constant table of the twiddle factors one PE needs.
//
// PE k of stage s sees a new pair every clock of the frame.  At frame
// position t its upper input is the sample with flow-graph index
// i = ntt_pkg::stage_index(n, p, s, t, k, 0), and the decimation-in-frequency
// butterfly needs w = W^e mod q with e = (i mod 2^(n-s)) * 2^(s-1).  The
// table holds that value for every t; it is computed at elaboration from the
// parameters, so changing N, P, q or W needs no data file.  With INV = 1 the
// table holds the inverse factors W^(-e) = W^(N-e) for the inverse
// (decimation-in-time) transform.
//
// Purely combinational lookup, addressed by the frame position.  The twiddle
// sequence follows from the DIF transform; storing one small table per PE is
// this design's choice.
module ntt_twiddle_rom #(
  parameter int unsigned LOGN = $clog2(ntt_pkg::NTT_N),
  parameter int unsigned LOGP = $clog2(ntt_pkg::NTT_P),
  parameter int unsigned S    = 1,                 // stage, 1..LOGN
  parameter int unsigned K    = 0,                 // PE within the stage, 0..P/2-1
  parameter int unsigned Q    = ntt_pkg::NTT_Q,
  parameter int unsigned W    = ntt_pkg::NTT_W,
  parameter int unsigned DW   = ntt_pkg::NTT_DW,
  parameter bit          INV  = 1'b0               // 1: inverse twiddles
) (
  input  logic [((LOGN-LOGP) > 0 ? LOGN-LOGP : 1)-1:0] pos,  // frame position
  output logic [DW-1:0]                                tw
);
  localparam int unsigned T = 1 << (LOGN - LOGP);

  logic [DW-1:0] rom [T];

  for (genvar t = 0; t < T; t++) begin : g_entry
    localparam int unsigned E0 = ntt_pkg::twiddle_exp(LOGN, LOGP, S, t, K);
    localparam int unsigned E  = INV ? ((1 << LOGN) - E0) % (1 << LOGN) : E0;
    assign rom[t] = DW'(ntt_pkg::modpow(W, E, Q));
  end

  if (T > 1) begin : g_lookup
    assign tw = rom[pos];
  end else begin : g_single
    assign tw = rom[0];
  end
endmodule
