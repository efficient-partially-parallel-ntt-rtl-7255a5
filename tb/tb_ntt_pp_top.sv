// tb_ntt_pp_top: end-to-end test of the NTT processor in the 4-parallel,
// 16-point configuration over q = 17 with W = 3 (the small worked example of
// the design).  Four frames, checked against a direct transform.
module tb_ntt_pp_top;
  localparam int unsigned N = 16, P = 4, Q = 17, W = 3, DW = 5;

  logic          clk, rst, in_valid, out_valid;
  logic [DW-1:0] in_data [P];
  logic [DW-1:0] out_data [P];
  int unsigned   swaps;
  logic          done;

  ntt_pp_top #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW)) dut (.*);

  ntt_pp_driver #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW), .NF(4)) drv (
    .clk, .rst, .in_valid, .in_data, .out_valid, .out_data, .swap_events(swaps), .done);

  // swaps of the first commutator of MDC 0
  initial swaps = 0;
  always @(posedge clk)
    if (dut.g_stage[1].g_reorder.g_mdc.g_comm[0].u_comm.swap) swaps++;

  initial begin
    #1 wait (done === 1'b1);
    $finish;
  end
endmodule
