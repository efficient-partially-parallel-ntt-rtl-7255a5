// tb_ntt_pe: checks the radix-2 DIF processing element for q = 12289.
// Random (a, b, w) every clock, with in_valid toggling; one clock later x
// must equal (a + b) % q and y ((a - b) * w) % q, and out_valid must follow
// in_valid by exactly one clock.
module tb_ntt_pe;
  localparam int unsigned Q = 12289, DW = 14;

  logic          clk = 1'b0, rst, in_valid, out_valid;
  logic [DW-1:0] a, b, w, x, y;
  int            checks = 0, failures = 0;
  int unsigned   ea, eb, ew;
  bit            ev;

  ntt_pe #(.Q(Q), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; in_valid = 1'b0; a = '0; b = '0; w = '0; ev = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks += 2;
        if (out_valid != ev) begin failures++; $display("FAIL valid at %0d", i); end
        if (x != DW'((ea + eb) % Q) ||
            y != DW'((longint'(ea + Q - eb) * ew) % Q)) begin
          failures++; $display("FAIL a=%0d b=%0d w=%0d -> x=%0d y=%0d", ea, eb, ew, x, y);
        end
      end
      ea = (i % 100 == 0) ? Q - 1 : $urandom % Q;
      eb = (i % 100 == 0) ? 0     : $urandom % Q;
      ew = (i % 50 == 0)  ? Q - 1 : $urandom % Q;
      ev = $urandom % 4 != 0;
      a = DW'(ea); b = DW'(eb); w = DW'(ew); in_valid = ev;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
