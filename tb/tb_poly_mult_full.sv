// tb_poly_mult_full: end-to-end test of the polynomial multiplier at its
// default configuration, N = 512, P = 8, q = 12289, W = 3, psi = 1321.
// Three frames of random polynomial pairs (the first one x^511 * x, which
// must wrap to -1), checked against the schoolbook product modulo
// x^512 + 1, with the latency of 2*(64 - 1 + 9) + 3 = 147 clocks and the
// one-product-per-64-clocks throughput.
module tb_poly_mult_full;
  localparam int unsigned N = ntt_pkg::NTT_N, P = ntt_pkg::NTT_P, Q = ntt_pkg::NTT_Q;
  localparam int unsigned DW = ntt_pkg::NTT_DW;

  logic          clk, rst, in_valid, out_valid;
  logic [DW-1:0] a_data [P];
  logic [DW-1:0] b_data [P];
  logic [DW-1:0] c_data [P];
  int unsigned   swaps;
  logic          done;

  poly_mult_top dut (
    .clk, .rst, .in_valid, .a_data, .b_data, .out_valid, .c_data);

  poly_mult_driver #(.N(N), .P(P), .Q(Q), .DW(DW), .NF(3)) drv (
    .clk, .rst, .in_valid, .a_data, .b_data, .out_valid, .out_data(c_data), .swap_events(swaps), .done);

  // swaps of the first commutator of the forward and the last of the inverse
  initial swaps = 0;
  always @(posedge clk) begin
    if (dut.u_ntt_a.g_stage[1].g_reorder.g_mdc.g_comm[0].u_comm.swap) swaps++;
    if (dut.u_intt.g_stage[2].g_reorder.g_mdc.g_comm[0].u_comm.swap) swaps++;
  end

  initial begin
    #1 wait (done === 1'b1);
    $finish;
  end
endmodule
