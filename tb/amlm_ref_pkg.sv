// amlm_ref_pkg: arithmetic reference models for the testbenches.
//
// Each function restates a block's published behaviour with integer
// arithmetic (division, multiplication, powers of two) instead of the RTL's
// gates, muxes and shifts, so that a testbench compares the RTL against an
// independent description. Widths are passed as arguments; all values fit in
// 64 bits for the sizes used (Y <= 24). Counters record which segment case
// each model call took, so testbenches can report that every case occurred.
package amlm_ref_pkg;

  longint unsigned acsa_case_cnt [3];

  // 1 when the operand has a non-zero bit at or above position x
  function automatic bit ref_hi(longint unsigned v, int x);
    return (v / (64'd1 << x)) != 0;
  endfunction

  // segment of an operand of width y: upper x bits when ref_hi, else lower x
  function automatic longint unsigned ref_seg(longint unsigned v, int y, int x);
    if (ref_hi(v, x)) return v / (64'd1 << (y - x));
    return v % (64'd1 << x);
  endfunction

  // approximate segmented adder: sum of segments scaled by 1, 2^((y-x)/2)
  // or 2^(y-x) for zero, one or two upper segments
  function automatic longint unsigned ref_acsa(longint unsigned a, longint unsigned b,
                                               int y, int x);
    longint unsigned z;
    int n;
    z = ref_seg(a, y, x) + ref_seg(b, y, x);
    n = int'(ref_hi(a, x)) + int'(ref_hi(b, x));
    acsa_case_cnt[n]++;
    case (n)
      0:       return z;
      1:       return z * (64'd1 << ((y - x) / 2));
      default: return z * (64'd1 << (y - x));
    endcase
  endfunction

  // multiplierless n x n multiplier: partial products a*2^k for b[k]=1,
  // accumulated in bit order by ref_acsa(2n, n), each result taken mod 2^2n
  function automatic longint unsigned ref_mlm(longint unsigned a, longint unsigned b, int n);
    longint unsigned acc, pp, m;
    m = 64'd1 << (2 * n);
    acc = (b % 2) * a;
    for (int k = 1; k < n; k++) begin
      pp = ((b / (64'd1 << k)) % 2) * a * (64'd1 << k);
      acc = ref_acsa(acc, pp, 2 * n, n) % m;
    end
    return acc;
  endfunction

  // static segment multiplier: segment product scaled by 2^((y-x)*count of
  // upper segments); exact selects the accurate segment product
  function automatic longint unsigned ref_amlm(longint unsigned a, longint unsigned b,
                                               int y, int x, bit exact);
    longint unsigned sa, sb, z;
    int n;
    sa = ref_seg(a, y, x);
    sb = ref_seg(b, y, x);
    z  = exact ? sa * sb : ref_mlm(sa, sb, x);
    n  = int'(ref_hi(a, x)) + int'(ref_hi(b, x));
    return z * (64'd1 << (n * (y - x)));
  endfunction

endpackage
