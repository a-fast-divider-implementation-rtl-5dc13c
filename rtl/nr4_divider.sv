// nr4_divider: fourth-order Newton-Raphson divider with parallel powering
// units.
//
// The quotient of two normalised mantissas is computed in a single
// Newton-Raphson step of fourth order,
//     q = a/b = aX [1 + e + e^2 + e^3 + e^4],   e = 1 - bX,
// where X is a short reciprocal seed read from a table.  Because
// 1 - e^5 = (1 - e)(1 + e + ... + e^4) and bX = 1 - e, the result equals
// (a/b)(1 - e^5): the relative error is e^5.  Instead of forming the powers
// one after another with multipliers, e^2, e^3 and e^4 are produced side by
// side by dedicated squaring, cubing and fourth-power units, each as fast
// as one multiplication, so the divide takes a table lookup plus three
// multiply times.
//
// Pipeline (one operation accepted per cycle, result three cycles later):
//   stage 1: table lookup, e = 1 - bX (fused multiply-subtract) and a*X in
//            parallel                                     -> register
//   stage 2: e^2, e^3, e^4 in parallel                    -> register
//   stage 3: S = 1 + e + e^2 + e^3 + e^4 and q = (aX)*S   -> register
// The data flow and the three multiply times follow the design description;
// placing one register after each multiply time, the active-low
// asynchronous reset and the valid flag are this design's choices.
//
// Interface: a and b are N-bit mantissas with their leading one (format
// 1.(N-1), value in [1,2)), sampled when in_valid is high.  q has the same
// format and is truncated, so it never exceeds a/b; it lies in (1/2,2).
// out_valid marks q three clock cycles after the operands were taken.
// With the default table (M = 5) the error e^5 is below 2^-22.7 relative;
// with the final truncation q is within 4 units of 2^-(N-1) below a/b.
module nr4_divider #(
  parameter int unsigned N = nr4_div_pkg::N_DEFAULT,
  parameter int unsigned M = nr4_div_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] q
);

  localparam int unsigned F   = N + M;                            // fraction bits of e, aX, S
  localparam int unsigned E_W = F - nr4_div_pkg::e_lead_zeros(M); // carried bits of e

  typedef struct packed {
    logic           valid;
    logic [E_W-1:0] e;
    logic [F:0]     ax;
  } stage1_t;

  typedef struct packed {
    logic             valid;
    logic [E_W-1:0]   e;
    logic [2*E_W-1:0] e2;
    logic [3*E_W-1:0] e3;
    logic [4*E_W-1:0] e4;
    logic [F:0]       ax;
  } stage2_t;

  // ---------------- stage 1: lookup, 1 - bX, a*X ----------------
  logic [M-1:0]   rom_word;
  logic [M:0]     x;
  logic [E_W-1:0] e_c;
  logic [F:0]     ax_c;

  recip_rom #(.M(M)) u_rom (
    .addr (b[N-2 -: M]),
    .word (rom_word)
  );

  assign x = {1'b1, rom_word};

  one_minus_bx #(.N(N), .M(M), .E_W(E_W)) u_one_minus_bx (
    .b (b),
    .x (x),
    .e (e_c)
  );

  ax_mult #(.N(N), .M(M)) u_ax_mult (
    .a  (a),
    .x  (x),
    .ax (ax_c)
  );

  stage1_t s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
    end else begin
      s1.valid <= in_valid;
      if (in_valid) begin
        s1.e  <= e_c;
        s1.ax <= ax_c;
      end
    end
  end

  // ---------------- stage 2: parallel powering units ----------------
  logic [2*E_W-1:0] e2_c;
  logic [3*E_W-1:0] e3_c;
  logic [4*E_W-1:0] e4_c;

  square_unit #(.W(E_W)) u_square (.a(s1.e), .p(e2_c));
  cube_unit   #(.W(E_W)) u_cube   (.a(s1.e), .p(e3_c));
  pow4_unit   #(.W(E_W)) u_pow4   (.a(s1.e), .p(e4_c));

  stage2_t s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0;
    end else begin
      s2.valid <= s1.valid;
      if (s1.valid) begin
        s2.e  <= s1.e;
        s2.e2 <= e2_c;
        s2.e3 <= e3_c;
        s2.e4 <= e4_c;
        s2.ax <= s1.ax;
      end
    end
  end

  // ---------------- stage 3: 1 + SUM and the final multiply ----------------
  logic [F:0]   s_c;
  logic [N-1:0] q_c;

  series_sum #(.F(F), .E_W(E_W)) u_series_sum (
    .e  (s2.e),
    .e2 (s2.e2),
    .e3 (s2.e3),
    .e4 (s2.e4),
    .s  (s_c)
  );

  final_mult #(.N(N), .F(F)) u_final_mult (
    .ax (s2.ax),
    .s  (s_c),
    .q  (q_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= s2.valid;
      if (s2.valid) q <= q_c;
    end
  end

  // Operands must be normalised: the table is addressed by the bits after
  // the leading one, and the seed is only valid for b in [1,2).
  always_ff @(posedge clk) begin
    if (rst_n && in_valid)
      a_operands_normalised: assert (a[N-1] && b[N-1])
        else $error("nr4_divider: operand without its leading one");
  end

endmodule
