// tb_recip_rom: checks every word of the reciprocal seed table.
//
// For each address i the full seed T = {1, word} must satisfy the table's
// rule independently of how the table is built: T/2^(M+1) is at or below
// the reciprocal of the interval's upper end 1 + (i+1)/2^M, and T+1 would
// break that rule (the seed is the largest allowed).  It also checks that
// the resulting 1 - bX at the interval's lower end stays below 1/16, which
// the divider relies on.
module tb_recip_rom;
  localparam int unsigned M = 5;

  logic [M-1:0] addr;
  logic [M-1:0] word;
  int checks = 0, failures = 0;

  recip_rom #(.M(M)) dut (.addr(addr), .word(word));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned t, hi, lo, one, emax;
    one = longint'(1) << (2 * M + 1);     // 1.0 at scale 2^-(2M+1)
    for (int i = 0; i < 2**M; i++) begin
      addr = M'(i);
      #1;
      t  = (longint'(1) << M) + longint'(word);
      hi = (longint'(1) << M) + longint'(i) + 1;
      lo = (longint'(1) << M) + longint'(i);
      checks++;
      if (hi * t > one) begin
        failures++;
        $display("FAIL addr %0d: seed %0d above 1/b_hi", i, t);
      end
      checks++;
      if (hi * (t + 1) <= one) begin
        failures++;
        $display("FAIL addr %0d: seed %0d not the largest allowed", i, t);
      end
      emax = one - lo * t;                 // 1 - b_lo X
      checks++;
      if (emax * 16 >= one) begin
        failures++;
        $display("FAIL addr %0d: 1-bX = %0d/2^%0d not below 1/16", i, emax, 2*M+1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
