// approx_ref_pkg: behavioural reference models used by the testbenches.
//
// They compute the expected result of each approximate unit with plain
// integer arithmetic, independent of the gate structure in the design:
//   gear_ref      GeAr(N, R, P): exact window sums, R result bits per window
//   sfa_add_ref   2N-bit addition with one simplified full adder at bit pos
//   udm_ref       recursive 2x2-block multiplier with the exact-HH rule
package approx_ref_pkg;

  // GeAr(N, R, P) with L = R + P: window j covers bits R*j .. R*j+L-1 (cut at
  // N-1); window 0 gives its L low bits, the others R bits above their P
  // prediction bits; the last window also gives the carry out (bit N).
  function automatic longint unsigned gear_ref(longint unsigned a, longint unsigned b,
                                               int n, int r, int p);
    longint unsigned res, win, mask;
    int l, lo, hi;
    l = r + p;
    if (l >= n) return a + b;
    mask = (64'd1 << l) - 1;
    res  = ((a & mask) + (b & mask)) & mask;
    lo   = r;
    while (lo + p < n) begin
      hi   = (lo + l > n) ? n : lo + l;
      mask = (64'd1 << (hi - lo)) - 1;
      win  = ((a >> lo) & mask) + ((b >> lo) & mask);
      if (hi == n) res |= (win >> p) << (lo + p);
      else         res |= ((win >> p) & ((64'd1 << r) - 1)) << (lo + p);
      lo += r;
    end
    return res;
  endfunction

  // x + y + cin over w bits where bit pos is a simplified full adder:
  // sum = (x^y)|c, carry = x&y. pos < 0 means an exact addition.
  function automatic longint unsigned sfa_add_ref(longint unsigned x, longint unsigned y,
                                                  int w, int pos, bit cin = 1'b0);
    longint unsigned lo_sum, hi_sum, wmask, lmask;
    longint unsigned c, xb, yb, sb, cb;
    wmask = (w >= 64) ? '1 : ((64'd1 << w) - 1);
    if (pos < 0) return (x + y + 64'(cin)) & wmask;
    lmask  = (64'd1 << pos) - 1;
    lo_sum = (x & lmask) + (y & lmask) + 64'(cin);
    c      = (lo_sum >> pos) & 1;
    xb     = (x >> pos) & 1;
    yb     = (y >> pos) & 1;
    sb     = (xb ^ yb) | c;
    cb     = xb & yb;
    hi_sum = (x >> (pos + 1)) + (y >> (pos + 1)) + cb;
    return ((hi_sum << (pos + 1)) | (sb << pos) | (lo_sum & lmask)) & wmask;
  endfunction

  // Recursive multiplier: HH exact, HL/LH/LL approximate when approx = 1;
  // 2x2 leaf gives 7 for 3*3 when approximate; sums LL+HL<<h, +LH<<h,
  // +HH<<n, each with an SFA at weight n when approx and sfa.
  function automatic longint unsigned udm_ref(longint unsigned a, longint unsigned b,
                                              int n, bit approx, bit sfa);
    longint unsigned hh, hl, lh, ll, t, hmask;
    int h, pos;
    if (n == 2) return (approx && a == 3 && b == 3) ? 64'd7 : a * b;
    h     = n / 2;
    hmask = (64'd1 << h) - 1;
    hh    = udm_ref(a >> h, b >> h, h, 1'b0, 1'b0);
    hl    = udm_ref(a >> h, b & hmask, h, approx, sfa);
    lh    = udm_ref(a & hmask, b >> h, h, approx, sfa);
    ll    = udm_ref(a & hmask, b & hmask, h, approx, sfa);
    pos   = (approx && sfa) ? n : -1;
    t     = sfa_add_ref(ll, hl << h, 2 * n, pos);
    t     = sfa_add_ref(t, lh << h, 2 * n, pos);
    t     = sfa_add_ref(t, hh << n, 2 * n, pos);
    return t;
  endfunction

endpackage
