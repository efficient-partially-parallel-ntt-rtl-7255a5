// tb_barrett_reduce: checks the Barrett reduction unit for q = 12289 and for
// q = 17 (5-bit) against x % q, for products of residues: corner products
// (0, (q-1)^2, multiples of q and their neighbours), 20000 random products
// and 5000 random values over the whole 2*DW-bit input range.
module tb_barrett_reduce;
  localparam int unsigned Q = 12289, DW = 14;
  localparam int unsigned QS = 17, DWS = 5;

  logic             clk = 1'b0;
  logic [2*DW-1:0]  x;
  logic [DW-1:0]    r;
  logic [2*DWS-1:0] xs;
  logic [DWS-1:0]   rs;
  int               checks = 0, failures = 0;

  barrett_reduce #(.Q(Q),  .DW(DW))  u_big   (.x(x),  .r(r));
  barrett_reduce #(.Q(QS), .DW(DWS)) u_small (.x(xs), .r(rs));

  always #5 clk = ~clk;

  task automatic check(input int unsigned v);
    x = (2*DW)'(v);
    @(posedge clk);
    checks++;
    if (r != DW'(v % Q)) begin failures++; $display("FAIL %0d mod q -> %0d", v, r); end
  endtask

  task automatic check_small(input int unsigned v);
    xs = (2*DWS)'(v);
    @(posedge clk);
    checks++;
    if (rs != DWS'(v % QS)) begin failures++; $display("FAIL %0d mod 17 -> %0d", v, rs); end
  endtask

  initial begin
    xs = '0;
    check(0);
    check((Q - 1) * (Q - 1));
    for (int k = 1; k < Q - 1; k += 97) begin
      check(k * Q - 1); check(k * Q); check(k * Q + 1);
    end
    repeat (20000) check(($urandom % Q) * ($urandom % Q));
    repeat (5000) check($urandom % (1 << (2 * DW)));       // whole input range
    for (int i = 0; i < QS; i++) for (int j = 0; j < QS; j++) check_small(i * j);
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
