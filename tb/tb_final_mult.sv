// tb_final_mult: random operands against a 64-bit product truncated to the
// N-bit quotient format 1.(N-1).
module tb_final_mult;
  localparam int unsigned N = 24;
  localparam int unsigned F = 29;

  logic [F:0]   ax;
  logic [F:0]   s;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  final_mult #(.N(N), .F(F)) dut (.ax(ax), .s(s), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned prod, exp_q;
    for (int n = 0; n < 2000; n++) begin
      ax = (F+1)'($urandom);
      // S in [1, 1.0625): the range the divider produces.
      s  = (F+1)'((longint'(1) << F) + longint'($urandom % (1 << (F - 4))));
      if (n == 0) begin ax = '1; s = '1; end
      #1;
      prod  = longint'(ax) * longint'(s);
      exp_q = (prod >> (2*F - (N-1))) & ((longint'(1) << N) - 1);
      checks++;
      if (longint'(q) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL ax=%h s=%h q=%h expected %h", ax, s, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
