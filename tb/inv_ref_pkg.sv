// inv_ref_pkg: reference arithmetic for the inverter testbenches.
//
// Holds big-integer and binary-polynomial helpers (gcd, carry-less multiply,
// polynomial remainder) used to check results by their defining property
// (b * a = 2^(2n) mod p, or b(x) a(x) = x^(2n) mod p(x)), a
// Miller-Rabin primality test for drawing random primes, a
// behavioural model of the inversion algorithm, written from the algorithm
// rather than the RTL, that predicts k and the number of loop passes of
// each phase so that the clock count can be checked exactly.
package inv_ref_pkg;

  localparam int RB = 520;
  typedef logic [RB-1:0]        big_t;
  typedef logic signed [RB-1:0] sbig_t;

  function automatic int bitlen(input big_t x);
    bitlen = 0;
    for (int i = RB - 1; i >= 0; i--)
      if (x[i]) return i + 1;
  endfunction

  function automatic big_t gcd(input big_t a, input big_t b);
    big_t t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic big_t pmod(input big_t a, input big_t p);
    int dp = bitlen(p);
    int da = bitlen(a);
    while (da >= dp) begin
      a  = a ^ (p << (da - dp));
      da = bitlen(a);
    end
    return a;
  endfunction

  function automatic big_t pmul(input big_t a, input big_t b);
    big_t r = '0;
    while (b != 0) begin
      if (b[0]) r = r ^ a;
      a = a << 1;
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic big_t pgcd(input big_t a, input big_t b);
    big_t t;
    while (b != 0) begin
      t = pmod(a, b);
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic big_t pow_mod(input big_t b, input big_t x, input big_t m);
    big_t r = 1;
    b = b % m;
    while (x != 0) begin
      if (x[0]) r = (r * b) % m;
      b = (b * b) % m;
      x = x >> 1;
    end
    return r;
  endfunction

  // Miller-Rabin with the first twelve prime bases (operands up to 256 bits).
  function automatic bit is_prime(input big_t n);
    int   bases[12] = '{2, 3, 5, 7, 11, 13, 17, 19, 23, 29, 31, 37};
    big_t d, x;
    int   r;
    if (n < 2) return 0;
    for (int i = 0; i < 12; i++) begin
      if (n == big_t'(bases[i])) return 1;
      if (n % big_t'(bases[i]) == 0) return 0;
    end
    d = n - 1;
    r = 0;
    while (!d[0]) begin
      d = d >> 1;
      r++;
    end
    for (int i = 0; i < 12; i++) begin
      bit ok = 0;
      x = pow_mod(big_t'(bases[i]), d, n);
      if (x == 1 || x == n - 1) continue;
      for (int j = 1; j < r; j++) begin
        x = (x * x) % n;
        if (x == n - 1) begin
          ok = 1;
          break;
        end
      end
      if (!ok) return 0;
    end
    return 1;
  endfunction

  // Expected result check.
  function automatic bit check_inverse(input big_t p, input big_t a, input big_t b,
                                       input int n, input bit fsel);
    big_t one = 1;
    if (!fsel)
      return (b < p) && ((b * a) % p == (one << (2 * n)) % p);
    else
      return (bitlen(b) <= n) && (pmod(pmul(b, a), p) == pmod(one << (2 * n), p));
  endfunction

  // Behavioural model of the algorithm: returns k and the pass counts.
  // Stats: [0..2] u shifts by 1..3, [3..5] v shifts by 1..3, [6] u-v, [7] v-u,
  // [8] neg even, [9] neg odd, [10] s<0 in pass A, [11..13] pass B picks
  // v/u/s, [14..16] Phase II shifts by 1..3, [17] Phase II with s_{n-1}=1.
  function automatic void model(input big_t p, input big_t a, input int n, input bit fsel,
                                output int k, output int it1, output int it2,
                                ref int stats[18]);
    sbig_t u, v, r, s, uu, vv, pp;
    int rem, b, t, c;
    pp = sbig_t'(p);
    u = pp; v = sbig_t'(a); r = 0; s = 1; k = 0; it1 = 0; it2 = 0;
    forever begin
      if (u >= 0) begin
        if (u == 0) break;
        if (u[0] == 0) begin
          t = (u[2:0] == 0) ? 3 : (u[1:0] == 0) ? 2 : 1;
          u = u >>> t; s = s <<< t; k += t; stats[t-1]++;
        end else if (v[0] == 0) begin
          t = (v[2:0] == 0) ? 3 : (v[1:0] == 0) ? 2 : 1;
          v = v >>> t; r = r <<< t; k += t; stats[t+2]++;
        end else if (bitlen(u) >= bitlen(v)) begin
          u = (fsel ? (u ^ v) : (u - v)) >>> 1;
          r = fsel ? (r ^ s) : (r + s);
          s = s <<< 1; k++; stats[6]++;
        end else begin
          v = (fsel ? (v ^ u) : (v - u)) >>> 1;
          s = fsel ? (s ^ r) : (s + r);
          r = r <<< 1; k++; stats[7]++;
        end
      end else begin
        if (u[0] == 0) begin
          u = (-u) >>> 1; s = s <<< 1; r = -r; k++; stats[8]++;
        end else begin
          v = (v + u) >>> 1; u = -u; s = s - r; r = -(r <<< 1); k++; stats[9]++;
        end
      end
      it1++;
    end
    if (!fsel) begin
      if (s < 0) begin
        stats[10]++;
        uu = s + pp; vv = s + 2 * pp;
        s = (uu < 0) ? vv : uu;
      end
      uu = s - pp; vv = s - 2 * pp;
      if (vv >= 0)      begin s = vv; stats[11]++; end
      else if (uu >= 0) begin s = uu; stats[12]++; end
      else              stats[13]++;
    end else begin
      if (s[n+1]) begin s = s ^ (pp <<< 1); stats[10]++; end
      if (s[n])   begin s = s ^ pp; stats[12]++; end
      else        stats[13]++;
    end
    rem = 2 * n - k;
    while (rem > 0) begin
      b = bitlen(big_t'(s));
      c = (b >= n) ? 1 : 0;
      t = (c != 0) ? 1 : ((n - b) >= 3 ? 3 : n - b);
      if (t > rem) t = rem;
      if (fsel) s = (s <<< t) ^ ((c != 0) ? pp : 0);
      else begin
        uu = (s <<< t) - ((c != 0) ? pp : sbig_t'(0));
        vv = (s <<< t) - ((c != 0) ? 2 * pp : pp);
        s = (vv < 0) ? uu : vv;
      end
      stats[13+t]++;
      if (c != 0) stats[17]++;
      rem -= t;
      it2++;
    end
  endfunction

endpackage
