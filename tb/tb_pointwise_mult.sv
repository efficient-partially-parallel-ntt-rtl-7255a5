// tb_pointwise_mult: checks the P = 8 lane pointwise modular multiplier for
// q = 12289: random operands every clock (with corner values), in_valid
// toggling; one clock later every lane must hold a*b % q and out_valid must
// follow in_valid.
module tb_pointwise_mult;
  localparam int unsigned P = 8, Q = 12289, DW = 14;

  logic          clk = 1'b0, rst, in_valid, out_valid;
  logic [DW-1:0] a [P], b [P], c [P];
  int unsigned   ea [P], eb [P];
  bit            evld;
  int            checks = 0, failures = 0;

  pointwise_mult #(.P(P), .Q(Q), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; in_valid = 1'b0; evld = 0;
    foreach (a[l]) begin a[l] = '0; b[l] = '0; ea[l] = 0; eb[l] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (out_valid != evld) begin failures++; $display("FAIL valid at %0d", i); end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (c[l] != DW'((longint'(ea[l]) * eb[l]) % Q)) begin
            failures++; $display("FAIL lane %0d: %0d*%0d -> %0d", l, ea[l], eb[l], c[l]);
          end
        end
      end
      for (int l = 0; l < P; l++) begin
        ea[l] = (i % 64 == l) ? Q - 1 : $urandom % Q;
        eb[l] = (i % 64 == l) ? Q - 1 : $urandom % Q;
        a[l] = DW'(ea[l]); b[l] = DW'(eb[l]);
      end
      evld = $urandom % 3 != 0;
      in_valid = evld;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
