// ntt_pp_driver: stimulus and checker for ntt_pp_top, shared by the
// end-to-end testbenches.
//
// It resets the processor, sends NF frames of random coefficients in the
// processor's input order (frames 0 and 1 back to back, then a long gap,
// then a one-clock gap, ...), and compares every output word with a direct
// O(N^2) evaluation of A_k = sum_j a_j W^(jk) mod q, taking the bit-reversed
// output order into account.  It also checks
//   * the latency of every frame: first output word N/P - 1 + log2(N)
//     clocks after its first input word,
//   * the throughput: every output frame is N/P consecutive valid clocks,
//     so back-to-back input frames leave back to back,
// and counts how often the mechanisms happened: commutator swaps (reported
// by the instantiating testbench through swap_events), back-to-back frames
// and frames after an idle gap.  Prints the TB_RESULT line and raises done,
// on which the instantiating testbench calls $finish; a watchdog ends a hung
// run the same way.
module ntt_pp_driver #(
  parameter int unsigned N  = 16,
  parameter int unsigned P  = 4,
  parameter int unsigned Q  = 17,
  parameter int unsigned W  = 3,
  parameter int unsigned DW = 5,
  parameter int unsigned NF = 4      // frames to send
) (
  output logic          clk,
  output logic          rst,
  output logic          in_valid,
  output logic [DW-1:0] in_data  [P],
  input  logic          out_valid,
  input  logic [DW-1:0] out_data [P],
  input  int unsigned   swap_events,
  output logic          done          // TB_RESULT printed; the testbench ends the run
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned T    = N / P;
  localparam int unsigned LAT  = T - 1 + LOGN;

  int unsigned a   [NF][N];
  int unsigned A   [NF][N];
  longint      t_in  [NF];
  longint      t_out [NF];
  longint      cycle;
  int          checks, failures;
  int          back_to_back, after_gap;
  int          of, ot;           // output frame / cycle within it
  bit          done_in;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  always @(posedge clk) cycle <= cycle + 1;
  initial cycle = 0;

  function automatic int unsigned bitrev(input int unsigned x);
    int unsigned r;
    r = 0;
    for (int b = 0; b < LOGN; b++) if (x[b]) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  // reference transform, direct summation
  task automatic reference(input int f);
    longint unsigned acc, wk, wkj;
    for (int k = 0; k < N; k++) begin
      wk  = 1;
      for (int e = 0; e < k; e++) wk = (wk * W) % Q;     // W^k
      acc = 0;
      wkj = 1;                                             // W^(k*j)
      for (int j = 0; j < N; j++) begin
        acc = (acc + a[f][j] * wkj) % Q;
        wkj = (wkj * wk) % Q;
      end
      A[f][k] = int'(acc);
    end
  endtask

  task automatic idle(input int c);
    repeat (c) begin
      @(negedge clk);
      in_valid = 1'b0;
      foreach (in_data[l]) in_data[l] = DW'($urandom % Q);   // junk, must be ignored
    end
  endtask

  task automatic send(input int f);
    t_in[f] = cycle;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      if (t == 0) t_in[f] = cycle;
      in_valid = 1'b1;
      for (int k = 0; k < P/2; k++) begin
        in_data[2*k]   = DW'(a[f][t*(P/2) + k]);
        in_data[2*k+1] = DW'(a[f][t*(P/2) + k + N/2]);
      end
    end
  endtask

  // stimulus
  initial begin
    checks = 0; failures = 0; back_to_back = 0; after_gap = 0; done_in = 0; done = 1'b0;
    rst = 1'b1;
    in_valid = 1'b0;
    foreach (in_data[l]) in_data[l] = '0;
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < N; j++) a[f][j] = $urandom % Q;
      if (f == NF - 1) begin           // last frame: corner values
        for (int j = 0; j < N; j++) a[f][j] = (j % 3 == 0) ? Q - 1 : (j % 3 == 1) ? 0 : a[f][j];
      end
      reference(f);
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    idle(2);
    for (int f = 0; f < NF; f++) begin
      send(f);
      if (f == 0) back_to_back++;      // frame 1 follows with no gap
      else if (f == 1) begin idle(T + 7); after_gap++; end
      else if (f < NF - 1) begin idle(1); after_gap++; end
    end
    idle(1);
    done_in = 1;
  end

  // checker
  initial begin of = 0; ot = 0; end
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (of >= NF) begin
        failures++;
        $display("FAIL: output beyond the last frame");
      end else begin
        if (ot == 0) begin
          t_out[of] = cycle;
          checks++;
          if (t_out[of] - t_in[of] != LAT) begin
            failures++;
            $display("FAIL: frame %0d latency %0d, expected %0d", of, t_out[of] - t_in[of], LAT);
          end
        end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (out_data[l] != DW'(A[of][bitrev(ot * P + l)])) begin
            failures++;
            if (failures < 10)
              $display("FAIL: frame %0d cycle %0d lane %0d: got %0d expected A[%0d]=%0d", of, ot, l,
                       out_data[l], bitrev(ot * P + l), A[of][bitrev(ot * P + l)]);
          end
        end
        if (ot == T - 1) begin of++; ot = 0; end
        else ot++;
      end
    end else if (!rst && ot != 0) begin
      failures++;
      $display("FAIL: output frame %0d interrupted at cycle %0d", of, ot);
      ot = 0;
      of++;
    end
  end

  // end of test
  initial begin
    wait (done_in);
    repeat (LAT + 20) @(posedge clk);
    checks++;
    if (of != NF) begin failures++; $display("FAIL: %0d of %0d frames came out", of, NF); end
    // back-to-back frames must leave back to back
    checks++;
    if (NF > 1 && t_out[1] - t_out[0] != T) begin
      failures++;
      $display("FAIL: frames 0/1 left %0d clocks apart, expected %0d", t_out[1] - t_out[0], T);
    end
    $display("mechanisms: commutator swaps=%0d back-to-back frames=%0d frames after gap=%0d",
             swap_events, back_to_back, after_gap);
    checks++;
    if (N / P > 1 && swap_events == 0) begin failures++; $display("FAIL: no commutator swap seen"); end
    checks++;
    if (back_to_back == 0 || after_gap == 0) begin failures++; $display("FAIL: framing mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end

  // watchdog
  initial begin
    repeat (NF * (2 * T + 10) + LAT + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end
endmodule
