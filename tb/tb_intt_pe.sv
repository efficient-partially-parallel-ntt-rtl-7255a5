// tb_intt_pe: checks the DIT processing element of the inverse transform
// for q = 12289.  Random (x, y, v) every clock with in_valid toggling; one
// clock later a must equal (x + y*v) % q and b (x - y*v) % q, and out_valid
// must follow in_valid by one clock.  A second part feeds the outputs of a
// forward butterfly (x = a'+b', y = (a'-b')*w) with v = w^-1 and checks that
// the pair comes back doubled, (2a', 2b').
module tb_intt_pe;
  localparam int unsigned Q = 12289, DW = 14;

  logic          clk = 1'b0, rst, in_valid, out_valid;
  logic [DW-1:0] x, y, v, a, b;
  int            checks = 0, failures = 0;
  longint unsigned ex, ey, ev_, ea, eb;
  bit            evld;

  intt_pe #(.Q(Q), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint unsigned inv(input longint unsigned w);
    longint unsigned r = 1, base = w, e = Q - 2;
    while (e != 0) begin
      if (e[0]) r = (r * base) % Q;
      base = (base * base) % Q;
      e >>= 1;
    end
    return r;
  endfunction

  initial begin
    rst = 1'b1; in_valid = 1'b0; x = '0; y = '0; v = '0; evld = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks += 2;
        if (out_valid != evld) begin failures++; $display("FAIL valid at %0d", i); end
        if (a != DW'((ex + ey * ev_) % Q) || b != DW'((ex + Q - (ey * ev_) % Q) % Q)) begin
          failures++; $display("FAIL x=%0d y=%0d v=%0d -> %0d/%0d", ex, ey, ev_, a, b);
        end
        if (i > 10000) begin
          checks++;
          if (a != DW'((2 * ea) % Q) || b != DW'((2 * eb) % Q)) begin
            failures++; $display("FAIL round trip %0d/%0d -> %0d/%0d", ea, eb, a, b);
          end
        end
      end
      if (i >= 10000) begin
        longint unsigned w;
        ea = $urandom % Q; eb = $urandom % Q; w = 1 + $urandom % (Q - 1);
        ex = (ea + eb) % Q;
        ey = (((ea + Q - eb) % Q) * w) % Q;
        ev_ = inv(w);
      end else begin
        ex = (i % 100 == 0) ? 0 : $urandom % Q;
        ey = (i % 100 == 0) ? Q - 1 : $urandom % Q;
        ev_ = (i % 50 == 0) ? Q - 1 : $urandom % Q;
      end
      evld = $urandom % 4 != 0;
      x = DW'(ex); y = DW'(ey); v = DW'(ev_); in_valid = evld;
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
