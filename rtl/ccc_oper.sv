// OPER(m, j; U, V): the basic operation that every CCC module applies to a pair of operands
// whose addresses differ in bit j.
//
// Three operations are provided, chosen per pass by cfg.op:
//   OP_CMPX  oriented compare-exchange used by bitonic merge and sort:
//            (U, V) <- (min, max) when the direction bit is 0, (max, min) otherwise.
//            The direction bit is bit cfg.obit of m (0 when obit >= KT), so that one merge
//            stage of a bitonic sort can sort alternate blocks up and down.
//   OP_BFLY  radix-2 FFT butterfly (U, V) <- (U + aV, U - aV) modulo 65537. The FFT is an
//            ASCEND algorithm; the array runs its dual DESCEND form, OPER~(m, j) =
//            OPER(rev(m), KT-1-j), so the root power is a = w^((rev(m) mod 2^j') * 2^j) with
//            j' = KT-1-j and w a primitive 2^KT-th root of unity. Inputs in natural order give
//            the transform in bit-reversed order. With cfg.ascend = 1 the array runs ASCEND
//            itself and the root power is w^((m mod 2^j) * 2^(KT-1-j)): inputs in
//            bit-reversed order give the transform in natural order.
//   OP_SHFT  cyclic shift: operand x moves to x + 2^obit (mod 2^(jmax+1) within each block
//            of 2^(jmax+1), the whole array when jmax = KT-1). The pair is swapped when
//            the carry of x + 2^obit reaches bit j: bits obit .. j-1 of m all 1 in a DESCEND
//            pass, all 0 in an ASCEND pass (those bits have already been incremented).
//            The document names the cyclic shift as a one-pass algorithm without giving its
//            OPER; this one is this design's own.
// With cfg.inv = 1 the butterfly uses the inverse root w^-1 in either form, for the inverse
// transform (the scaling by 1/2^KT is left to the user).
// OPER acts only when j <= cfg.jmax; otherwise, or for OP_NOP, U and V pass unchanged.
// The root powers come from two tables (powers of w and of w^-1) computed at elaboration
// time by repeated multiplication.
// Products are reduced with 2^16 = -1 (mod 65537), so no divider is needed. Operands of a
// butterfly are expected below 65537.
//
// Interface: m is the address of U (bit j of m is 0), j the dimension. Purely combinational.
module ccc_oper
  import ccc_pkg::*;
#(
  parameter int KT = 6,    // address bits of the whole operand array (k + q)
  parameter int W  = 17    // operand width; OP_BFLY needs W >= 17
) (
  input  cfg_t          cfg,
  input  logic [DW-1:0] j,
  input  logic [AW-1:0] m,
  input  logic [W-1:0]  u,
  input  logic [W-1:0]  v,
  output logic [W-1:0]  u_o,
  output logic [W-1:0]  v_o
);

  localparam int TWN = (KT > 1) ? (1 << (KT - 1)) : 1;

  typedef logic [TWN-1:0][16:0] tw_t;

  // powers of w (inverse = 0) or of w^-1 = w^(2^KT - 1) (inverse = 1)
  function automatic tw_t make_table(input bit inverse);
    tw_t t;
    longint unsigned w, x;
    w = root_of_unity(KT);
    if (inverse)
      for (int i = 0; i < (1 << KT) - 2; i++) w = mulmod(w, root_of_unity(KT));
    x = 1;
    for (int e = 0; e < TWN; e++) begin
      t[e] = 17'(x);
      x = mulmod(x, w);
    end
    return t;
  endfunction

  localparam tw_t TW  = make_table(1'b0);
  localparam tw_t TWI = make_table(1'b1);

  logic          dir;
  logic          shf;
  logic [AW-1:0] mrev;
  logic [AW-1:0] e;
  logic [16:0]   alpha;
  logic [33:0]   prod;
  logic [16:0]   av, us, sum, dif;
  logic [18:0]   red;
  logic [17:0]   s18, d18;

  always_comb begin
    // direction of the compare-exchange
    dir = (int'(cfg.obit) < KT) ? m[cfg.obit[3:0]] : 1'b0;

    // cyclic shift by +2^obit: operand x moves to x + 2^obit, so address bit j flips when
    // the carry reaches it, i.e. when bits obit .. j-1 of x are all 1. In a DESCEND pass
    // those bits are still the original ones; in an ASCEND pass they have already flipped
    // to 0. Both operands of the pair carry, so the pair is swapped.
    shf = (int'(j) >= int'(cfg.obit));
    for (int b = 0; b < KT; b++)
      if (b >= int'(cfg.obit) && b < int'(j) && m[b] == cfg.ascend) shf = 1'b0;

    // root power index of the butterfly
    mrev = '0;
    for (int b = 0; b < KT; b++) mrev[KT-1-b] = m[b];
    e = '0;
    if (cfg.ascend) begin
      // ASCEND step j: w^((m mod 2^j) * 2^(KT-1-j))
      for (int b = 0; b < KT; b++)
        if (b < int'(j)) e[b] = m[b];
      e = e << (KT - 1 - int'(j));
    end else begin
      // dual DESCEND step j: w^((rev(m) mod 2^(KT-1-j)) * 2^j)
      for (int b = 0; b < KT; b++)
        if (b < KT - 1 - int'(j)) e[b] = mrev[b];
      e = e << j;
    end
    alpha = cfg.inv ? TWI[int'(e) % TWN] : TW[int'(e) % TWN];

    us   = 17'(u);
    prod = alpha * 17'(v);
    // prod = h1 * 2^32 + h0 * 2^16 + lo with 2^16 = -1 (mod 65537):
    // prod = lo - h0 + h1, in -65535 .. 65538; add 65537 and fold once more
    red  = 19'(prod[15:0]) + 19'(prod[33:32]) + 19'(MODP) - 19'(prod[31:16]);
    av   = (red >= 19'(MODP)) ? 17'(red - 19'(MODP)) : 17'(red);
    // operands below 65537, so one conditional subtraction reduces a sum or difference
    s18  = 18'(us) + 18'(av);
    sum  = (s18 >= 18'(MODP)) ? 17'(s18 - 18'(MODP)) : 17'(s18);
    d18  = 18'(us) + 18'(MODP) - 18'(av);
    dif  = (d18 >= 18'(MODP)) ? 17'(d18 - 18'(MODP)) : 17'(d18);

    u_o = u;
    v_o = v;
    if (int'(j) <= int'(cfg.jmax)) begin
      unique case (cfg.op)
        OP_CMPX: begin
          if ((u > v) != dir) begin
            u_o = v;
            v_o = u;
          end
        end
        OP_BFLY: begin
          u_o = W'(sum);
          v_o = W'(dif);
        end
        OP_SHFT: begin
          if (shf) begin
            u_o = v;
            v_o = u;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
