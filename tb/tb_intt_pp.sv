// tb_intt_pp: checks the inverse processor for N = 64, P = 8, q = 12289,
// W = 3^8 = 6561 (a 64th root of unity); this size has three commutators
// and two lane shuffles per MDC pipeline like the full design.  For random
// coefficient vectors a the spectrum A_k = sum_j a_j W^(jk) is computed here
// and fed in the forward processor's output order (lane l of clock t holds
// A[bitrev(t*P + l)]); the output must be N * a_i mod q in the forward
// input order (lane 2k+u of clock t holds index t*(P/2) + k + u*N/2), with
// latency N/P - 1 + log2(N) = 13 clocks.  Three frames: two back to back,
// one after a gap.
module tb_intt_pp;
  localparam int unsigned N = 64, P = 8, Q = 12289, W = 6561, DW = 14;
  localparam int unsigned LOGN = 6, T = N / P, LAT = T - 1 + LOGN, NF = 3;

  logic          clk = 1'b0, rst, in_valid, out_valid;
  logic [DW-1:0] in_data [P], out_data [P];
  int unsigned   a [NF][N], A [NF][N];
  longint        cycle = 0, t_in [NF];
  int            checks = 0, failures = 0, of = 0, ot = 0;

  intt_pp #(.N(N), .P(P), .Q(Q), .W(W), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int unsigned bitrev(input int unsigned x);
    int unsigned r = 0;
    for (int b = 0; b < LOGN; b++) if (x[b]) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  task automatic send(input int f);
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      if (t == 0) t_in[f] = cycle;
      in_valid = 1'b1;
      for (int l = 0; l < P; l++) in_data[l] = DW'(A[f][bitrev(t * P + l)]);
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    foreach (in_data[l]) in_data[l] = '0;
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < N; j++) a[f][j] = $urandom % Q;
      for (int k = 0; k < N; k++) begin
        longint unsigned acc, wk, wkj;
        acc = 0; wk = 1; wkj = 1;
        for (int e = 0; e < k; e++) wk = (wk * W) % Q;
        for (int j = 0; j < N; j++) begin
          acc = (acc + a[f][j] * wkj) % Q;
          wkj = (wkj * wk) % Q;
        end
        A[f][k] = int'(acc);
      end
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    send(0); send(1);
    @(negedge clk); in_valid = 1'b0;
    repeat (11) @(negedge clk);
    send(2);
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 10) @(negedge clk);
    checks++;
    if (of != NF) begin failures++; $display("FAIL: %0d frames out", of); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid && of < NF) begin
      if (ot == 0) begin
        checks++;
        if (cycle - t_in[of] != LAT) begin
          failures++; $display("FAIL frame %0d latency %0d", of, cycle - t_in[of]);
        end
      end
      for (int l = 0; l < P; l++) begin
        int unsigned i;
        i = ot * (P / 2) + l / 2 + (l % 2) * (N / 2);
        checks++;
        if (out_data[l] != DW'((N * a[of][i]) % Q)) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d t=%0d lane %0d: %0d, expected %0d", of, ot, l,
                                      out_data[l], (N * a[of][i]) % Q);
        end
      end
      if (ot == T - 1) begin ot = 0; of++; end else ot++;
    end
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
