// lns_tb_pkg -- testbench support for the LNS ALU: table contents and
// reference models, computed with real arithmetic.
//
// Table contents (the host loads these into the four SRAM banks):
//   g_add(x) = log2(1 + 2^-x), g_sub(x) = log2(1 - 2^-x), x = d / 2^23 >= 0
//   interval k (k = 0..2047) covers x in [k/64, (k+1)/64), h = 1/64
//   F[k] = g(x0) * 2^26                      (bank 0, address {sub, k})
//   D[k] = (g(x1) - g(x0)) / (x1 - x0) * 2^24 (bank 1, secant slope)
//   E[k] = 4 * (g(xm) - secant(xm)) * 2^26    (bank 2, error at the midpoint)
//   P[m] = u (1 - u) * 2^32, u = (32 m + 16) / 2^17, m = 0..4095 (bank 3)
// For subtraction g has a pole at x = 0; interval 0 uses x0 = 2^-12 instead
// of 0, so results with |r| < 1/64 are only approximate there.
//
// The reference add/subtract works on reals: z = i + g(|r|), rounded to the
// nearest 2^-23, with the same special codes and saturation rules as the
// format defines.
package lns_tb_pkg;
  import lns_pkg::*;

  localparam real LN2 = 0.6931471805599453;

  function automatic real log2r(real v);
    return $ln(v) / LN2;
  endfunction

  function automatic real g_fun(bit sub, real x);
    real p;
    p = $pow(2.0, -x);
    return sub ? log2r(1.0 - p) : log2r(1.0 + p);
  endfunction

  function automatic logic [31:0] sat32(real v);
    if (v > 2147483647.0) return 32'h7FFF_FFFF;
    if (v < -2147483648.0) return 32'h8000_0000;
    return 32'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  // word `addr` of table bank `bank` (0 F, 1 D, 2 E, 3 P)
  function automatic logic [31:0] tab_word(int bank, int addr);
    bit  sub;
    int  k;
    real x0, x1, xm, g0, g1, s, fq, dq, sec;
    if (bank == 3) begin
      real u;
      u = (32.0 * addr + 16.0) / 131072.0;
      return 32'($rtoi(u * (1.0 - u) * 4294967296.0 + 0.5));
    end
    sub = addr[11];
    k   = addr & 2047;
    x0  = k / 64.0;
    x1  = (k + 1) / 64.0;
    if (sub && k == 0) x0 = 1.0 / 4096.0;
    xm  = k / 64.0 + 1.0 / 128.0;
    g0  = g_fun(sub, x0);
    g1  = g_fun(sub, x1);
    s   = (g1 - g0) / (x1 - x0);
    fq  = $itor($signed(sat32(g0 * 67108864.0))) / 67108864.0;
    dq  = $itor($signed(sat32(s * 16777216.0))) / 16777216.0;
    sec = fq + dq * (xm - k / 64.0);
    case (bank)
      0:       return sat32(g0 * 67108864.0);
      1:       return sat32(s * 16777216.0);
      default: return sat32(4.0 * (g_fun(sub, xm) - sec) * 67108864.0);
    endcase
  endfunction

  function automatic lns_t lns_from_log(longint lg, bit sign);
    lns_t z;
    z.sign = sign;
    z.lg   = 31'(lg);
    return z;
  endfunction

  // reference saturating add/subtract
  function automatic void ref_addsub(lns_t a, lns_t b, bit sub,
                                     output lns_t z, output lns_status_t st);
    lns_t   be;
    longint la, lb, li, d, lz;
    bit     sgn, esub;
    real    v;
    be = b; be.sign = b.sign ^ sub;
    st = '0;
    if (a == LNS_NAN || b == LNS_NAN) begin z = LNS_NAN; st.nan = 1; return; end
    if (a == LNS_ZERO) begin z = (b == LNS_ZERO) ? LNS_ZERO : be; return; end
    if (b == LNS_ZERO) begin z = a; return; end
    la = longint'(a.lg); lb = longint'(b.lg);
    esub = a.sign ^ be.sign;
    if (la >= lb) begin li = la; d = la - lb; sgn = a.sign; end
    else          begin li = lb; d = lb - la; sgn = be.sign; end
    if (esub && d == 0) begin z = LNS_ZERO; return; end
    v  = $itor(li) + g_fun(esub, $itor(d) / 8388608.0) * 8388608.0;
    lz = longint'($rtoi($floor(v + 0.5)));
    if (lz > 64'sd1073741823) begin z = lns_from_log(1073741823, sgn); st.overflow = 1; end
    else if (lz < -64'sd1073741823) begin z = LNS_ZERO; st.underflow = 1; end
    else z = lns_from_log(lz, sgn);
  endfunction


  // Accept an add/subtract result: exact for special codes and status,
  // within 1 ulp of the rounded log for addition and for subtraction with
  // |r| >= 1, and for |r| < 1 within a magnitude error (2^-23 units of the
  // larger operand) of 1024 for |r| >= 1/64 and 131072 below.
  function automatic bit addsub_ok(lns_t a, lns_t b, bit sub, lns_t z, lns_status_t st);
    lns_t zr; lns_status_t sr;
    longint e, dd;
    real mz, mr, big, err;
    ref_addsub(a, b, sub, zr, sr);
    if (zr == LNS_ZERO || zr == LNS_NAN || z == LNS_ZERO || z == LNS_NAN || sr != '0)
      return z == zr && st == sr;
    if (z.sign != zr.sign || st != sr) return 0;
    e  = longint'(z.lg) - longint'(zr.lg);
    if (e < 0) e = -e;
    dd = longint'(a.lg) - longint'(b.lg);
    if (dd < 0) dd = -dd;
    if ((a.sign ^ b.sign ^ sub) == 0 || dd >= 64'sd8388608) return e <= 1;
    mz  = $pow(2.0, $itor(z.lg) / 8388608.0);
    mr  = $pow(2.0, $itor(zr.lg) / 8388608.0);
    big = $pow(2.0, $itor(a.lg > b.lg ? a.lg : b.lg) / 8388608.0);
    err = (mz > mr ? mz - mr : mr - mz) / big * 8388608.0;
    return err <= ((dd >= 64'sd131072) ? 1024.0 : 131072.0);
  endfunction

  // reference saturating mul/div/sqrt
  function automatic void ref_muldiv(alu_op_t op, lns_t a, lns_t b,
                                     output lns_t z, output lns_status_t st);
    longint s;
    st = '0;
    if (a == LNS_NAN || (op != OP_SQRT && b == LNS_NAN) || (op == OP_DIV && b == LNS_ZERO)) begin
      z = LNS_NAN; st.nan = 1; return;
    end
    if (a == LNS_ZERO || (op == OP_MUL && b == LNS_ZERO)) begin z = LNS_ZERO; return; end
    case (op)
      OP_MUL:  s = longint'(a.lg) + longint'(b.lg);
      OP_DIV:  s = longint'(a.lg) - longint'(b.lg);
      default: s = (longint'(a.lg) + 1) >>> 1;
    endcase
    if (s > 64'sd1073741823) begin z = lns_from_log(1073741823, 0); st.overflow = 1; end
    else if (s < -64'sd1073741823) begin z = LNS_ZERO; st.underflow = 1; return; end
    else z = lns_from_log(s, 0);
    z.sign = (op == OP_SQRT) ? a.sign : (a.sign ^ b.sign);
  endfunction

  // real value of an LNS word (zero code gives 0.0)
  function automatic real lns_to_real(lns_t x);
    real m;
    if (x == LNS_ZERO) return 0.0;
    m = $pow(2.0, $itor(x.lg) / 8388608.0);
    return x.sign ? -m : m;
  endfunction

  // LNS word of a real value (round to nearest log)
  function automatic lns_t real_to_lns(real v);
    real l;
    if (v == 0.0) return LNS_ZERO;
    l = log2r(v < 0.0 ? -v : v) * 8388608.0;
    return lns_from_log(longint'($rtoi(l < 0.0 ? l - 0.5 : l + 0.5)), v < 0.0);
  endfunction

  // random nonzero LNS operand with log in +-2^span LSB
  function automatic lns_t rand_lns(int span);
    longint l;
    l = longint'($signed($urandom())) >>> (32 - span);
    if (l <= -64'sd1073741824) l = -64'sd1073741823;
    return lns_from_log(l, 1'($urandom()));
  endfunction

endpackage
