// tb_ntt_pp_full: end-to-end test of the NTT processor at its default
// configuration, 8-parallel 512-point transform over q = 12289 with W = 3.
// Four frames (two back to back, then gaps), checked against a direct
// transform, with the latency of N/P - 1 + log2(N) = 72 clocks and the
// one-frame-per-64-clocks throughput.
module tb_ntt_pp_full;
  localparam int unsigned N = ntt_pkg::NTT_N, P = ntt_pkg::NTT_P;
  localparam int unsigned Q = ntt_pkg::NTT_Q, W = ntt_pkg::NTT_W, DW = ntt_pkg::NTT_DW;

  logic          clk, rst, in_valid, out_valid;
  logic [DW-1:0] in_data [P];
  logic [DW-1:0] out_data [P];
  int unsigned   swaps;
  logic          done;

  ntt_pp_top dut (.*);

  ntt_pp_driver #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW), .NF(4)) drv (
    .clk, .rst, .in_valid, .in_data, .out_valid, .out_data, .swap_events(swaps), .done);

  initial swaps = 0;
  always @(posedge clk)
    if (dut.g_stage[1].g_reorder.g_mdc.g_comm[0].u_comm.swap) swaps++;

  initial begin
    #1 wait (done === 1'b1);
    $finish;
  end
endmodule
