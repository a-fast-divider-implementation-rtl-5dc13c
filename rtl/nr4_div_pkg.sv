// nr4_div_pkg: constants and elaboration-time functions shared by the
// fourth-order Newton-Raphson divider.
//
// Number formats used throughout (all unsigned fixed point):
//   a, b   : N-bit normalised mantissas, value in [1,2), format 1.(N-1).
//   X      : reciprocal seed, M+1 bits, value in [1/2,1), format 0.(M+1);
//            its top bit is always 1, so the lookup table stores only the
//            M bits below it (a 2^M x M table).
//   e      : 1 - bX, exact, F = N+M fraction bits.  The table guarantees
//            e < 2^-LZ, so only the low F-LZ bits of e are carried.
//
// The table rule follows the design description: every seed must be at or
// below 1/b for all b that map to its address, so 1 - bX is never negative.
// The seed is therefore floor(2^(M+1) / b_hi), where b_hi is the upper end
// of the address interval.
package nr4_div_pkg;

  // Operand length of the main configuration: the IEEE single-precision
  // mantissa with its hidden bit.
  localparam int unsigned N_DEFAULT = 24;
  // Lookup table address and word width: about n/5 bits for n = 24.
  localparam int unsigned M_DEFAULT = 5;

  // Full seed (M+1 bits, top bit 1) for table address i.
  // Address i covers b in [1 + i/2^M, 1 + (i+1)/2^M).
  function automatic longint unsigned seed_full(int unsigned m, int unsigned i);
    longint unsigned num, den;
    num = longint'(1) << (2 * m + 1);
    den = (longint'(1) << m) + longint'(i) + 1;
    return num / den;
  endfunction

  // Largest 1 - bX over the whole table, scaled by 2^(2M+1).  It occurs at
  // the lower end of an address interval.
  function automatic longint unsigned e_max_scaled(int unsigned m);
    longint unsigned worst, cur;
    worst = 0;
    for (int unsigned i = 0; i < (1 << m); i++) begin
      cur = (longint'(1) << (2 * m + 1)) - ((longint'(1) << m) + longint'(i)) * seed_full(m, i);
      if (cur > worst) worst = cur;
    end
    return worst;
  endfunction

  // Number of leading fraction bits of e that are always zero:
  // the largest z with e_max < 2^-z.
  function automatic int unsigned e_lead_zeros(int unsigned m);
    longint unsigned w;
    int unsigned z;
    w = e_max_scaled(m);
    z = 0;
    while ((z + 1 <= 2 * m + 1) && (w < (longint'(1) << (2 * m + 1 - (z + 1))))) z++;
    return z;
  endfunction

endpackage
