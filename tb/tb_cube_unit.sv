// tb_cube_unit: the reduced-array powering unit against the power formed
// with ordinary multiplications at full width, for zero, all ones, every
// single-bit operand and random operands.
module tb_cube_unit;
  localparam int unsigned W = 24;
  localparam int unsigned PW = 3 * W;

  logic [W-1:0]  a;
  logic [PW-1:0] p;
  logic [PW-1:0] ref_p;
  int checks = 0, failures = 0;

  cube_unit #(.W(W)) dut (.a(a), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] v);
    logic [PW-1:0] w;
    a = v;
    #1;
    w = PW'(v);
    ref_p = w*w*w;
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h p=%h expected %h", v, p, ref_p);
    end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    for (int i = 0; i < W; i++) check_one(W'(1) << i);
    for (int n = 0; n < 1500; n++) check_one(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
