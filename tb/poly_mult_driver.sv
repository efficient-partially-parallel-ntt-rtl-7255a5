// poly_mult_driver: stimulus and checker for poly_mult_top, shared by the
// polynomial-multiplier testbenches.
//
// It resets the multiplier, sends NF frames of random polynomial pairs in
// the processor's input order (frames 0 and 1 back to back, then a long gap,
// then a one-clock gap, ...), and compares every output word with the
// schoolbook product modulo x^N + 1,
//     c_k = sum_{i+j=k} a_i b_j - sum_{i+j=k+N} a_i b_j  mod q,
// in the same lane order.  It also checks
//   * the latency of every frame: first output word 2*(N/P - 1 + log2 N) + 3
//     clocks after its first input word,
//   * the throughput: every output frame is N/P consecutive valid clocks,
//     so back-to-back input frames leave back to back,
// and counts how often the mechanisms happened: commutator swaps (reported
// by the instantiating testbench through swap_events), back-to-back frames
// and frames after an idle gap.  Prints the TB_RESULT line and raises done,
// on which the instantiating testbench calls $finish; a watchdog ends a hung
// run the same way.
module poly_mult_driver #(
  parameter int unsigned N  = 16,
  parameter int unsigned P  = 4,
  parameter int unsigned Q  = 12289,
  parameter int unsigned DW = 14,
  parameter int unsigned NF = 4      // frames to send
) (
  output logic          clk,
  output logic          rst,
  output logic          in_valid,
  output logic [DW-1:0] a_data [P],
  output logic [DW-1:0] b_data [P],
  input  logic          out_valid,
  input  logic [DW-1:0] out_data [P],
  input  int unsigned   swap_events,
  output logic          done          // TB_RESULT printed; the testbench ends the run
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned T    = N / P;
  localparam int unsigned LAT  = 2 * (T - 1 + LOGN) + 3;

  int unsigned a   [NF][N];
  int unsigned b   [NF][N];
  int unsigned A   [NF][N];    // expected product coefficients
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

  // output lane l of frame clock t carries this coefficient index
  function automatic int unsigned lane_index(input int unsigned t, input int unsigned l);
    return t * (P / 2) + l / 2 + (l % 2) * (N / 2);
  endfunction

  // reference product modulo x^N + 1, schoolbook
  task automatic reference(input int f);
    longint unsigned acc;
    for (int k = 0; k < N; k++) begin
      acc = 0;
      for (int i = 0; i < N; i++) begin
        if (i <= k) acc = (acc + longint'(a[f][i]) * b[f][k - i]) % Q;
        else        acc = (acc + longint'(Q - a[f][i]) * b[f][k + N - i]) % Q;
      end
      A[f][k] = int'(acc);
    end
  endtask

  task automatic idle(input int c);
    repeat (c) begin
      @(negedge clk);
      in_valid = 1'b0;
      foreach (a_data[l]) begin                          // junk, must be ignored
        a_data[l] = DW'($urandom % Q);
        b_data[l] = DW'($urandom % Q);
      end
    end
  endtask

  task automatic send(input int f);
    t_in[f] = cycle;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      if (t == 0) t_in[f] = cycle;
      in_valid = 1'b1;
      for (int l = 0; l < P; l++) begin
        a_data[l] = DW'(a[f][lane_index(t, l)]);
        b_data[l] = DW'(b[f][lane_index(t, l)]);
      end
    end
  endtask

  // stimulus
  initial begin
    checks = 0; failures = 0; back_to_back = 0; after_gap = 0; done_in = 0; done = 1'b0;
    rst = 1'b1;
    in_valid = 1'b0;
    foreach (a_data[l]) begin a_data[l] = '0; b_data[l] = '0; end
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < N; j++) begin a[f][j] = $urandom % Q; b[f][j] = $urandom % Q; end
      if (f == NF - 1) begin           // last frame: corner values
        for (int j = 0; j < N; j++) begin
          a[f][j] = (j % 3 == 0) ? Q - 1 : (j % 3 == 1) ? 0 : a[f][j];
          b[f][j] = (j % 2 == 0) ? Q - 1 : b[f][j];
        end
      end
      if (f == 0) begin                // first frame: x^(N-1) * x = -1 wraps around
        for (int j = 0; j < N; j++) begin a[f][j] = 0; b[f][j] = 0; end
        a[f][N-1] = 1; b[f][1] = 1;
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
          if (out_data[l] != DW'(A[of][lane_index(ot, l)])) begin
            failures++;
            if (failures < 10)
              $display("FAIL: frame %0d cycle %0d lane %0d: got %0d expected c[%0d]=%0d", of, ot, l,
                       out_data[l], lane_index(ot, l), A[of][lane_index(ot, l)]);
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
    $display("mechanisms: commutator swaps (NTT and INTT)=%0d back-to-back frames=%0d frames after gap=%0d",
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
