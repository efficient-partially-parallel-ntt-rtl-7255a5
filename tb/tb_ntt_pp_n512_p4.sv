// tb_ntt_pp_n512_p4: end-to-end test of the 512-point NTT processor over
// q = 12289, W = 3 with parallel factor P = 4 (one of the three parallel
// factors the architecture is laid out for).  Four frames checked against a
// direct transform, including latency N/P - 1 + log2(N) and throughput.
module tb_ntt_pp_n512_p4;
  localparam int unsigned N = 512, P = 4, Q = 12289, W = 3, DW = 14;

  logic          clk, rst, in_valid, out_valid;
  logic [DW-1:0] in_data [P];
  logic [DW-1:0] out_data [P];
  int unsigned   swaps;
  logic          done;

  ntt_pp_top #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW)) dut (.*);

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
