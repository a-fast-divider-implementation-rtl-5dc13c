// tb_series_sum: random values of e with their exact powers formed by
// multiplication; the expected S adds 1, e and each power truncated to F
// fraction bits.  Also checks the sum against the closed form
// (1 - e^5)/(1 - e) in real arithmetic, to within the truncation error.
module tb_series_sum;
  localparam int unsigned F   = 29;
  localparam int unsigned E_W = 25;

  logic [E_W-1:0]   e;
  logic [2*E_W-1:0] e2;
  logic [3*E_W-1:0] e3;
  logic [4*E_W-1:0] e4;
  logic [F:0]       s;
  int checks = 0, failures = 0;

  series_sum #(.F(F), .E_W(E_W)) dut (.e(e), .e2(e2), .e3(e3), .e4(e4), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] w, w2, w3, w4, exp_s;
    real er, sr;
    for (int n = 0; n < 2000; n++) begin
      if (n == 0)      e = '1;
      else if (n == 1) e = '0;
      else             e = E_W'($urandom);
      w  = 128'(e);
      w2 = w * w;
      w3 = w2 * w;
      w4 = w3 * w;
      e2 = w2[2*E_W-1:0];
      e3 = w3[3*E_W-1:0];
      e4 = w4[4*E_W-1:0];
      #1;
      exp_s = (128'(1) << F) + w + (w2 >> F) + (w3 >> (2*F)) + (w4 >> (3*F));
      checks++;
      if (128'(s) != exp_s) begin
        failures++;
        if (failures < 10) $display("FAIL e=%h s=%h expected %h", e, s, exp_s);
      end
      er = real'(e) / (2.0 ** F);
      sr = (1.0 - er**5) / (1.0 - er);
      checks++;
      if (sr - real'(s) / (2.0 ** F) > 3.01 / (2.0 ** F) || sr - real'(s) / (2.0 ** F) < -1.0e-12) begin
        failures++;
        if (failures < 10) $display("FAIL e=%h s=%h off closed form %f", e, s, sr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
