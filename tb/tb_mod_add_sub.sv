// tb_mod_add_sub: checks the add and subtract reduction units for q = 12289
// against (a + b) % q and (a - b + q) % q: all corner pairs of
// {0, 1, q-2, q-1} and 20000 random operand pairs.
module tb_mod_add_sub;
  localparam int unsigned Q = 12289, DW = 14;

  logic          clk = 1'b0;
  logic [DW-1:0] a, b, r_add, r_sub;
  int            checks = 0, failures = 0;

  mod_add_sub #(.Q(Q), .DW(DW), .SUB(1'b0)) u_add (.a(a), .b(b), .r(r_add));
  mod_add_sub #(.Q(Q), .DW(DW), .SUB(1'b1)) u_sub (.a(a), .b(b), .r(r_sub));

  always #5 clk = ~clk;

  task automatic check(input int unsigned x, input int unsigned y);
    a = DW'(x); b = DW'(y);
    @(posedge clk);
    checks += 2;
    if (r_add != DW'((x + y) % Q)) begin
      failures++; $display("FAIL add %0d+%0d -> %0d", x, y, r_add);
    end
    if (r_sub != DW'((x + Q - y) % Q)) begin
      failures++; $display("FAIL sub %0d-%0d -> %0d", x, y, r_sub);
    end
  endtask

  initial begin
    int unsigned c [4] = '{0, 1, Q - 2, Q - 1};
    foreach (c[i]) foreach (c[j]) check(c[i], c[j]);
    repeat (20000) check($urandom % Q, $urandom % Q);
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
