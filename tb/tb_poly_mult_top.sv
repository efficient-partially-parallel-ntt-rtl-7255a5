// tb_poly_mult_top: end-to-end test of the polynomial multiplier at a small
// size: N = 16, P = 4, q = 12289 with W = 3^32 = 5736 (a 16th root of unity)
// and psi = 1321^32 = 10643 (psi^2 = W).  Four frames of random polynomial
// pairs (the first one x^15 * x, which must wrap to -1), checked against the
// schoolbook product modulo x^16 + 1, with latency and throughput.
module tb_poly_mult_top;
  localparam int unsigned N = 16, P = 4, Q = 12289, W = 5736, PSI = 10643, DW = 14;

  logic          clk, rst, in_valid, out_valid;
  logic [DW-1:0] a_data [P];
  logic [DW-1:0] b_data [P];
  logic [DW-1:0] c_data [P];
  int unsigned   swaps;
  logic          done;

  poly_mult_top #(.N(N), .P(P), .Q(Q), .W(W), .PSI(PSI), .DW(DW)) dut (
    .clk, .rst, .in_valid, .a_data, .b_data, .out_valid, .c_data);

  poly_mult_driver #(.N(N), .P(P), .Q(Q), .DW(DW), .NF(4)) drv (
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
