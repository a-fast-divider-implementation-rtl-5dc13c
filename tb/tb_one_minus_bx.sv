// tb_one_minus_bx: random divisors against 1 - bX computed with a plain
// product.  The seed for each b is chosen by the table rule (largest
// (M+1)-bit X with X <= 1/b_hi), so the result is never negative.
module tb_one_minus_bx;
  localparam int unsigned N   = 24;
  localparam int unsigned M   = 5;
  localparam int unsigned F   = N + M;
  localparam int unsigned E_W = 25;

  logic [N-1:0]   b;
  logic [M:0]     x;
  logic [E_W-1:0] e;
  int checks = 0, failures = 0;

  one_minus_bx #(.N(N), .M(M), .E_W(E_W)) dut (.b(b), .x(x), .e(e));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned idx, exp_e;
    for (int n = 0; n < 3000; n++) begin
      if (n == 0)      b = {1'b1, {(N-1){1'b0}}};
      else if (n == 1) b = '1;
      else             b = {1'b1, (N-1)'($urandom)};
      idx = longint'(b[N-2 -: M]);
      x = (M+1)'((longint'(1) << (2*M+1)) / ((longint'(1) << M) + idx + 1));
      #1;
      exp_e = (longint'(1) << F) - longint'(b) * longint'(x);
      checks++;
      if (longint'(e) != exp_e) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h x=%h e=%h expected %h", b, x, e, exp_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
