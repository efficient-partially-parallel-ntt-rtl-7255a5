// tb_coef_scaler: checks the psi weighting for N = 512, P = 8, q = 12289,
// psi = 1321.  Two frames go through a forward (INV=0) and an inverse
// (INV=1) scaler; lane 2k+u of frame clock t carries coefficient index
// i = t*4 + k + u*256, and the outputs must be a_i * psi^i and
// c_i * 512^-1 * psi^-i mod q, one clock later.  The inverse constants are
// computed here as psi^(1024-i) * 12265 (12265 = 512^-1 mod 12289).
module tb_coef_scaler;
  localparam int unsigned N = 512, P = 8, Q = 12289, PSI = 1321, DW = 14, T = N / P;

  logic          clk = 1'b0, rst, in_valid, fv, iv;
  logic [DW-1:0] din [P], fo [P], io [P];
  int unsigned   hist [P];
  int            checks = 0, failures = 0;

  coef_scaler #(.N(N), .P(P), .Q(Q), .PSI(PSI), .DW(DW), .INV(1'b0)) u_fwd (
    .clk, .rst, .in_valid, .din, .out_valid(fv), .dout(fo));
  coef_scaler #(.N(N), .P(P), .Q(Q), .PSI(PSI), .DW(DW), .INV(1'b1)) u_inv (
    .clk, .rst, .in_valid, .din, .out_valid(iv), .dout(io));

  always #5 clk = ~clk;

  function automatic longint unsigned pw(input longint unsigned base, input int unsigned e);
    longint unsigned r = 1;
    for (int k = 0; k < e; k++) r = (r * base) % Q;
    return r;
  endfunction

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    foreach (din[l]) din[l] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      for (int t = 0; t <= T; t++) begin
        @(negedge clk);
        if (t > 0) begin
          checks++;
          if (!fv || !iv) begin failures++; $display("FAIL valid missing at t=%0d", t - 1); end
          for (int l = 0; l < P; l++) begin
            int unsigned i;
            i = (t - 1) * (P / 2) + l / 2 + (l % 2) * (N / 2);
            checks += 2;
            if (fo[l] != DW'((hist[l] * pw(PSI, i)) % Q)) begin
              failures++; $display("FAIL fwd t=%0d lane %0d i=%0d: %0d", t - 1, l, i, fo[l]);
            end
            if (io[l] != DW'((((hist[l] * pw(PSI, 2 * N - i)) % Q) * 12265) % Q)) begin
              failures++; $display("FAIL inv t=%0d lane %0d i=%0d: %0d", t - 1, l, i, io[l]);
            end
          end
        end
        if (t < T) begin
          in_valid = 1'b1;
          for (int l = 0; l < P; l++) begin hist[l] = $urandom % Q; din[l] = DW'(hist[l]); end
        end else in_valid = 1'b0;
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
