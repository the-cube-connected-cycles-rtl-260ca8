// Reference models for the CCC testbenches, written from the algorithm definitions and
// independent of the RTL schedule: DESCEND and ASCEND on a flat array (every pair at
// distance 2^j, j from the top bit down or from 0 up), the oriented compare-exchange, the
// FFT butterfly in its ASCEND and dual DESCEND forms (forward and inverse), the cyclic-shift exchange, a direct
// rotation of the array, a direct O(N^2) discrete Fourier
// transform modulo 65537 and bit reversal.
package tb_ccc_ref_pkg;

  localparam longint unsigned P = 65537;

  function automatic longint unsigned powmod(longint unsigned b, longint unsigned e);
    longint unsigned r;
    r = 1;
    b = b % P;
    while (e != 0) begin
      if (e[0]) r = (r * b) % P;
      b = (b * b) % P;
      e = e >> 1;
    end
    return r;
  endfunction

  // primitive 2^kt-th root of unity: 3 has order 65536 modulo 65537
  function automatic longint unsigned omega(int kt);
    return powmod(3, 65536 >> kt);
  endfunction

  function automatic int bitrev(int x, int nb);
    int r;
    r = 0;
    for (int b = 0; b < nb; b++) if (((x >> b) & 1) != 0) r |= 1 << (nb - 1 - b);
    return r;
  endfunction

  // op: 0 none, 1 compare-exchange, 2 butterfly, 3 cyclic shift
  function automatic void ref_oper(input int op, input int jmax, input int obit, input int kt,
                                   input int j, input int m,
                                   inout longint unsigned u, inout longint unsigned v,
                                   input int asc = 0, input int inv = 0);
    longint unsigned a, t, x, y;
    int up;
    if (j > jmax) return;
    if (op == 1) begin
      up = (obit < kt) ? ((m >> obit) & 1) : 0;
      if ((up == 0 && u > v) || (up == 1 && u < v)) begin
        t = u; u = v; v = t;
      end
    end else if (op == 2) begin
      if (asc != 0)
        // ASCEND step j: root w^((m mod 2^j) * 2^(kt-1-j))
        a = powmod(omega(kt), longint'((m % (1 << j)) * (1 << (kt - 1 - j))));
      else
        // dual of ASCEND step j' = kt-1-j on position rev(m): w^((rev(m) mod 2^j') * 2^(kt-1-j'))
        a = powmod(omega(kt), longint'((bitrev(m, kt) % (1 << (kt - 1 - j))) * (1 << j)));
      if (inv != 0) a = powmod(a, P - 2);
      t = (a * v) % P;
      x = (u + t) % P;
      y = (u + P - t) % P;
      u = x; v = y;
    end else if (op == 3) begin
      // rotation by +2^obit: the carry into bit j needs bits obit .. j-1 of the original
      // address all 1; an ASCEND pass has already turned them into 0
      bit carry;
      carry = (j >= obit);
      for (int b = obit; b < j; b++)
        if (((m >> b) & 1) != ((asc != 0) ? 0 : 1)) carry = 0;
      if (carry) begin
        t = u; u = v; v = t;
      end
    end
  endfunction

  // expected result of a cyclic shift pass: operand x of each block of 2^(jmax+1) moves to
  // x + 2^obit modulo the block size
  function automatic void ref_rotate(inout longint unsigned d[], input int jmax, input int obit,
                                     input int kt);
    longint unsigned s[];
    int bs;
    s = d;
    bs = 1 << (jmax + 1);
    if (obit > jmax) return;
    for (int x = 0; x < (1 << kt); x++)
      d[(x / bs) * bs + (x % bs + (1 << obit)) % bs] = s[x];
  endfunction

  function automatic void ref_descend(inout longint unsigned d[], input int op, input int jmax,
                                      input int obit, input int kt, input int inv = 0);
    longint unsigned u, v;
    for (int j = kt - 1; j >= 0; j--)
      for (int m = 0; m < (1 << kt); m++)
        if (((m >> j) & 1) == 0) begin
          u = d[m];
          v = d[m + (1 << j)];
          ref_oper(op, jmax, obit, kt, j, m, u, v, 0, inv);
          d[m] = u;
          d[m + (1 << j)] = v;
        end
  endfunction

  function automatic void ref_ascend(inout longint unsigned d[], input int op, input int jmax,
                                     input int obit, input int kt, input int inv = 0);
    longint unsigned u, v;
    for (int j = 0; j < kt; j++)
      for (int m = 0; m < (1 << kt); m++)
        if (((m >> j) & 1) == 0) begin
          u = d[m];
          v = d[m + (1 << j)];
          ref_oper(op, jmax, obit, kt, j, m, u, v, 1, inv);
          d[m] = u;
          d[m + (1 << j)] = v;
        end
  endfunction

  // A_x = sum_i a_i w^(i x) mod P
  function automatic longint unsigned dft_at(input longint unsigned a[], input int kt, input int x);
    longint unsigned s, w;
    s = 0;
    w = omega(kt);
    for (int i = 0; i < (1 << kt); i++)
      s = (s + a[i] * powmod(w, longint'(i) * longint'(x))) % P;
    return s;
  endfunction

endpackage
