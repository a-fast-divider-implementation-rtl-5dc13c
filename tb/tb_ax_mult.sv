// tb_ax_mult: random and corner operands against a 64-bit product.
module tb_ax_mult;
  localparam int unsigned N = 24;
  localparam int unsigned M = 5;

  logic [N-1:0] a;
  logic [M:0]   x;
  logic [N+M:0] ax;
  int checks = 0, failures = 0;

  ax_mult #(.N(N), .M(M)) dut (.a(a), .x(x), .ax(ax));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ref_p;
    for (int n = 0; n < 2000; n++) begin
      a = (n == 0) ? '1 : N'($urandom);
      x = (n == 0) ? '1 : (M+1)'($urandom);
      #1;
      ref_p = longint'(a) * longint'(x);
      checks++;
      if (longint'(ax) != ref_p) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h x=%h ax=%h expected %h", a, x, ax, ref_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
