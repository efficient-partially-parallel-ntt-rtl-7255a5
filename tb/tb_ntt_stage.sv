// tb_ntt_stage: checks one NTT stage in the 512-point, 8-parallel
// configuration for stages 1, 7 and 9 (a front stage, the last MDC stage and
// the last stage).  A frame of 64 clocks of random words goes in; for each
// PE k and clock t the expected outputs are x = a + b and y = (a - b) * w,
// where w = 3^e mod 12289 and e is the DIF twiddle exponent of the flow-graph
// index the PE handles at that clock, worked out here from the index
// formulas of the front (MDC) and rear stages.  Latency one clock.
module tb_ntt_stage;
  localparam int unsigned LOGN = 9, LOGP = 3, P = 8, T = 64;
  localparam int unsigned Q = 12289, W = 3, DW = 14;
  localparam int unsigned NS = 3;
  localparam int unsigned STAGES [NS] = '{1, 7, 9};

  logic          clk = 1'b0, rst, in_valid;
  logic [DW-1:0] din [P];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  function automatic longint unsigned pw(input int unsigned e);
    longint unsigned r = 1;
    for (int i = 0; i < e; i++) r = (r * W) % Q;
    return r;
  endfunction

  // upper flow-graph index of PE k at clock t in stage s
  function automatic int unsigned upper_index(input int unsigned s, input int unsigned t,
                                              input int unsigned k);
    int unsigned m, bitpos, j;
    m = LOGN - LOGP + 1;                       // 7
    if (s <= m) begin
      bitpos = m - s;                          // pair bit inside MDC sub-index
      j = ((t >> bitpos) << (bitpos + 1)) | (t & ((1 << bitpos) - 1));
      return j * (P / 2) + k;
    end else begin
      bitpos = LOGN - s;                       // pair bit of the low index bits
      return t * P + (((k >> bitpos) << (bitpos + 1)) | (k & ((1 << bitpos) - 1)));
    end
  endfunction

  for (genvar g = 0; g < NS; g++) begin : g_dut
    localparam int unsigned S = STAGES[g];
    logic          ov;
    logic [DW-1:0] dout [P];
    ntt_stage #(.LOGN(LOGN), .LOGP(LOGP), .S(S), .Q(Q), .W(W), .DW(DW)) dut (
      .clk, .rst, .in_valid, .din, .out_valid(ov), .dout);
  end

  logic [DW-1:0] hist [T][P];

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    foreach (din[l]) din[l] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      for (int t = 0; t <= T; t++) begin
        @(negedge clk);
        // outputs of clock t-1
        if (t > 0) begin
          for (int g = 0; g < NS; g++) begin
            logic [DW-1:0] o [P];
            logic          v;
            case (g)
              0: begin o = g_dut[0].dout; v = g_dut[0].ov; end
              1: begin o = g_dut[1].dout; v = g_dut[1].ov; end
              default: begin o = g_dut[2].dout; v = g_dut[2].ov; end
            endcase
            checks++;
            if (!v) begin failures++; $display("FAIL stage %0d valid missing", STAGES[g]); end
            for (int k = 0; k < P / 2; k++) begin
              int unsigned i, e, a, b;
              i = upper_index(STAGES[g], t - 1, k);
              e = (i % (1 << (LOGN - STAGES[g]))) << (STAGES[g] - 1);
              a = hist[t-1][2*k]; b = hist[t-1][2*k+1];
              checks++;
              if (o[2*k] != DW'((a + b) % Q) ||
                  o[2*k+1] != DW'(((a + Q - b) * pw(e)) % Q)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL stage %0d t=%0d PE %0d: got %0d/%0d (e=%0d)", STAGES[g], t - 1, k,
                           o[2*k], o[2*k+1], e);
              end
            end
          end
        end
        if (t < T) begin
          in_valid = 1'b1;
          foreach (din[l]) begin din[l] = DW'($urandom % Q); hist[t][l] = din[l]; end
        end else begin
          in_valid = 1'b0;
        end
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
