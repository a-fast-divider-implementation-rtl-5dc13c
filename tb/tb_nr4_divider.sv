// tb_nr4_divider: end-to-end test of the divider at its default size
// (24-bit mantissas, 32-entry seed table).
//
// Operands are issued in bursts separated by random idle cycles.  Every
// result is compared bit for bit with a reference model written with
// ordinary multiplications (seed from the table rule, e = 1 - bX, powers
// by repeated products, truncated series sum, final product), and in real
// arithmetic with a/b: the quotient must never exceed a/b and must be
// within 4 units of 2^-23 below it.  The latency must be exactly three
// cycles.  A reset is applied once while operations are in flight and no
// result may appear for them.  The test counts how often each mechanism
// occurred (every table entry used, back-to-back issue, a full pipeline,
// idle cycles, the e^3 and e^4 terms reaching the sum, the flush by
// reset) and counts a failure for any that never happened.
module tb_nr4_divider;
  localparam int unsigned N   = 24;
  localparam int unsigned M   = 5;
  localparam int unsigned F   = N + M;
  localparam int unsigned LAT = 3;
  localparam int          NOPS = 4000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [N-1:0] a, b;
  logic         out_valid;
  logic [N-1:0] q;

  int checks = 0, failures = 0;
  int cycle = 0;

  nr4_divider dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .q(q)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NOPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int n_e3_used = 0, n_e4_used = 0;

  function automatic logic [N-1:0] ref_q(input logic [N-1:0] av, input logic [N-1:0] bv,
                                         output bit e3_used, output bit e4_used);
    logic [127:0] t, e, ax, e2, e3, e4, s, prod;
    t  = 128'((64'(1) << (2*M+1)) / ((64'(1) << M) + 64'(bv[N-2 -: M]) + 1));
    e  = (128'(1) << F) - 128'(bv) * t;
    ax = 128'(av) * t;
    e2 = e * e;
    e3 = e2 * e;
    e4 = e3 * e;
    e3_used = (e3 >> (2*F)) != 0;
    e4_used = (e4 >> (3*F)) != 0;
    s    = (128'(1) << F) + e + (e2 >> F) + (e3 >> (2*F)) + (e4 >> (3*F));
    prod = ax * s;
    return N'(prod >> (2*F - (N-1)));
  endfunction

  // ---------------- scoreboard ----------------
  typedef struct {
    logic [N-1:0] a, b, q;
    int           cyc;
  } exp_t;
  exp_t expq[$];

  int hits [2**M];
  int n_b2b = 0, n_full = 0, n_idle = 0, n_flush = 0, n_results = 0;
  real max_ulps = 0.0;
  int inflight = 0;
  logic prev_valid = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        exp_t x;
        real qr, qd, ulps;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected result q=%h", q);
        end else begin
          x = expq.pop_front();
          n_results++;
          if (q !== x.q) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h q=%h expected %h", x.a, x.b, q, x.q);
          end
          checks++;
          if (cycle - x.cyc != LAT) begin
            failures++;
            $display("FAIL latency %0d, expected %0d", cycle - x.cyc, LAT);
          end
          qr   = real'(x.a) / real'(x.b);
          qd   = real'(q) / (2.0 ** (N-1));
          ulps = (qr - qd) * (2.0 ** (N-1));
          if (ulps > max_ulps) max_ulps = ulps;
          checks++;
          if (ulps < -1.0e-6 || ulps > 4.0) begin
            failures++;
            $display("FAIL a=%h b=%h q=%h is %f units from a/b", x.a, x.b, q, ulps);
          end
        end
      end
    end
  end

  task automatic issue(input logic [N-1:0] av, input logic [N-1:0] bv);
    exp_t x;
    bit u3, u4;
    @(negedge clk);
    in_valid = 1'b1;
    a = av;
    b = bv;
    x.a = av; x.b = bv;
    x.q = ref_q(av, bv, u3, u4);
    if (u3) n_e3_used++;
    if (u4) n_e4_used++;
    hits[bv[N-2 -: M]]++;
    if (prev_valid) n_b2b++;
    @(posedge clk);
    x.cyc = cycle;            // value sampled with this edge
    expq.push_back(x);
    prev_valid = 1'b1;
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1'b0;
      a = $urandom; b = $urandom;   // ignored while in_valid is low
      n_idle++;
      @(posedge clk);
      prev_valid = 1'b0;
    end
  endtask

  function automatic logic [N-1:0] rnd_mant();
    return {1'b1, (N-1)'($urandom)};
  endfunction

  // Count cycles with all three stages busy.
  always @(posedge clk) begin
    if (rst_n && dut.s1.valid && dut.s2.valid && in_valid) n_full++;
  end

  initial begin
    in_valid = 1'b0;
    a = '0;
    b = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Corner operands.
    issue({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});   // 1/1
    issue('1, {1'b1, {(N-1){1'b0}}});                       // (2-u)/1
    issue({1'b1, {(N-1){1'b0}}}, '1);                       // 1/(2-u)
    issue('1, '1);
    idle(5);

    // Reset with operations in flight: they must vanish.
    issue(rnd_mant(), rnd_mant());
    issue(rnd_mant(), rnd_mant());
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    expq.delete();
    n_flush++;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid during reset");
    end
    rst_n = 1'b1;
    prev_valid = 1'b0;
    idle(5);
    checks++;
    if (expq.size() != 0 || out_valid) begin
      failures++;
      $display("FAIL stale result after reset");
    end

    // Every table entry at least once, then random bursts.
    for (int i = 0; i < 2**M; i++)
      issue(rnd_mant(), {1'b1, M'(i), (N-1-M)'($urandom)});
    for (int n = 0; n < NOPS; ) begin
      int burst;
      burst = 1 + ($urandom % 8);
      for (int k = 0; k < burst; k++) begin
        issue(rnd_mant(), rnd_mant());
        n++;
      end
      idle($urandom % 3);
    end
    idle(LAT + 2);

    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", expq.size());
    end

    // Mechanism coverage.
    for (int i = 0; i < 2**M; i++) begin
      checks++;
      if (hits[i] == 0) begin
        failures++;
        $display("FAIL table entry %0d never used", i);
      end
    end
    $display("results=%0d back_to_back=%0d pipeline_full=%0d idle=%0d flush=%0d e3_used=%0d e4_used=%0d",
             n_results, n_b2b, n_full, n_idle, n_flush, n_e3_used, n_e4_used);
    $display("largest distance below a/b: %f units of 2^-%0d", max_ulps, N-1);
    checks++; if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back issue"); end
    checks++; if (n_full == 0)  begin failures++; $display("FAIL pipeline never full"); end
    checks++; if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_flush == 0) begin failures++; $display("FAIL no flush"); end
    checks++; if (n_e3_used == 0) begin failures++; $display("FAIL e^3 never reached the sum"); end
    checks++; if (n_e4_used == 0) begin failures++; $display("FAIL e^4 never reached the sum"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
