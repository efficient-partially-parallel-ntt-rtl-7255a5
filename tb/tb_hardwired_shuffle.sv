// tb_hardwired_shuffle: checks the delay-free lane permutation for P = 4
// (D = 1) and P = 16 (D = 3, 2, 1).  Each input lane carries the low index
// bits of the sample on it (lane 2k+u of a stage pairing on bit D holds the
// index with bit D = u and the other bits = k); after the shuffle, output
// lane 2k'+u' must hold the index with bit D-1 = u' and the other bits = k'.
// For P = 4 that is the exchange of lanes 1 and 2.
module tb_hardwired_shuffle;
  localparam int unsigned DW = 14;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // index with bit position pos set to v and the remaining bits from x
  function automatic int unsigned ins(input int unsigned x, input int unsigned pos, input bit v);
    int unsigned lo;
    lo = x & ((1 << pos) - 1);
    return ((x >> pos) << (pos + 1)) | (int'(v) << pos) | lo;
  endfunction

  logic [DW-1:0] i4 [4], o4 [4];
  hardwired_shuffle #(.DW(DW), .P(4), .D(1)) u4 (.din(i4), .dout(o4));

  logic [DW-1:0] i16 [3][16], o16 [3][16];
  for (genvar g = 0; g < 3; g++) begin : g_p16
    hardwired_shuffle #(.DW(DW), .P(16), .D(3 - g)) u16 (.din(i16[g]), .dout(o16[g]));
  end

  initial begin
    for (int l = 0; l < 4; l++) i4[l] = DW'(ins(l >> 1, 1, l[0]));
    for (int g = 0; g < 3; g++)
      for (int l = 0; l < 16; l++) i16[g][l] = DW'(ins(l >> 1, 3 - g, l[0]));
    @(posedge clk);
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (o4[l] != DW'(ins(l >> 1, 0, l[0]))) begin
        failures++; $display("FAIL P=4 lane %0d holds %0d", l, o4[l]);
      end
    end
    checks++;
    if (o4[1] != i4[2] || o4[2] != i4[1]) begin failures++; $display("FAIL P=4 not a 1<->2 exchange"); end
    for (int g = 0; g < 3; g++)
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (o16[g][l] != DW'(ins(l >> 1, 2 - g, l[0]))) begin
          failures++; $display("FAIL P=16 D=%0d lane %0d holds %0d", 3 - g, l, o16[g][l]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
