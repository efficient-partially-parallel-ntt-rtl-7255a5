// tb_mdc_commutator: checks the delay commutator with T = 16 clocks per
// frame and delays L = 8, 4, 2 and 1.  Each word carries its frame number and
// its sub-index j: at input clock t the upper lane holds j with bit log2(L)+1
// cleared and the remaining bits = t, the lower lane the same j with that bit
// set.  Exactly L clocks later, output clock t' must hold the pair that
// differs in bit log2(L) instead, with the other bits = t'.  Frames are sent
// back to back, after a long gap and after a one-clock gap; the number of
// clocks the switch crossed is counted and must be non-zero.
module tb_mdc_commutator;
  localparam int unsigned DW = 10, T = 16, NF = 4;
  localparam int unsigned NL = 4;

  logic          clk = 1'b0, rst, in_valid;
  logic [DW-1:0] in_up, in_lo;
  int            checks = 0, failures = 0, swaps = 0;
  longint        cycle = 0;
  longint        t_first [NF];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int unsigned ins(input int unsigned x, input int unsigned pos, input bit v);
    int unsigned lo;
    lo = x & ((1 << pos) - 1);
    return ((x >> pos) << (pos + 1)) | (int'(v) << pos) | lo;
  endfunction

  for (genvar g = 0; g < NL; g++) begin : g_dut
    localparam int unsigned LB = 3 - g;     // log2(L)
    localparam int unsigned L  = 1 << LB;
    logic          ov;
    logic [DW-1:0] ou, ol;
    logic [DW-1:0] iu, il;
    int            of = 0, ot = 0;

    // input tags for this delay: pair bit LB+1
    always_comb begin
      iu = in_up; il = in_lo;
      if (in_valid) begin
        iu = DW'((in_up >> 5) * 32 + ins(in_up[4:0], LB + 1, 1'b0));
        il = DW'((in_up >> 5) * 32 + ins(in_up[4:0], LB + 1, 1'b1));
      end
    end

    mdc_commutator #(.DW(DW), .T(T), .L(L)) dut (
      .clk, .rst, .in_valid, .in_up(iu), .in_lo(il),
      .out_valid(ov), .out_up(ou), .out_lo(ol));

    always @(posedge clk) begin
      if (!rst && dut.swap) swaps++;
      if (!rst && ov) begin
        if (ot == 0) begin
          checks++;
          if (cycle - t_first[of] != L) begin
            failures++; $display("FAIL L=%0d frame %0d latency %0d", L, of, cycle - t_first[of]);
          end
        end
        checks++;
        if (ou != DW'(of * 32 + ins(ot, LB, 1'b0)) || ol != DW'(of * 32 + ins(ot, LB, 1'b1))) begin
          failures++;
          $display("FAIL L=%0d frame %0d clock %0d: got %0d/%0d", L, of, ot, ou, ol);
        end
        if (ot == T - 1) begin ot = 0; of++; end else ot++;
      end
    end
  end

  // the input carries frame*32 + t on in_up; each instance builds its tags
  task automatic send(input int f);
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      if (t == 0) t_first[f] = cycle;
      in_valid = 1'b1;
      in_up = DW'(f * 32 + t);
      in_lo = '0;
    end
  endtask

  task automatic idle(input int c);
    repeat (c) begin
      @(negedge clk);
      in_valid = 1'b0;
      in_up = DW'($urandom); in_lo = DW'($urandom);
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_up = '0; in_lo = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    idle(2);
    send(0); send(1); idle(20); send(2); idle(1); send(3); idle(30);
    checks++;
    if (g_dut[0].of != NF || g_dut[1].of != NF || g_dut[2].of != NF || g_dut[3].of != NF) begin
      failures++; $display("FAIL: not all frames came out");
    end
    checks++;
    if (swaps == 0) begin failures++; $display("FAIL: switch never crossed"); end
    $display("switch crossings: %0d", swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
