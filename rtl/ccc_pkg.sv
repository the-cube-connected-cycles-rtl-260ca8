// Shared types, constants and schedule functions for the cube-connected-cycles (CCC)
// processor array.
//
// A CCC holds n = 2^k operands, one per module (or 2^q per module when each module owns a
// private RAM). Every module runs the same program: it counts time steps and, from its own
// address (l, p) and the step number, decides whether to idle, take the operand of a
// neighbour, or exchange operands with a neighbour and apply the basic operation OPER.
// The decision logic lives here as pure functions so that every module controller and the
// testbenches see one definition of the schedule.
//
// Schedule of one DESCEND pass (one step = one clock when q = 0):
//   HIGHSHEAVES, 4*2^r steps: for i = 2^r-1 down to -2^r, an OPER step on the lateral links
//     followed by a backward cyclic shift of every cycle (BSHIFT).
//   LOWSHEAVES (LOOPOPER), 2^(r+1)-r-2 steps: the bit-reversal permutation of each cycle built
//     from UNSHUFFLE exchange steps, then for j = r-1 down to 0 one OPER step between cycle
//     neighbours followed by UNSHUFFLE(j).
// ASCEND is the same schedule played backwards: the steps in reverse order, each backward
// shift replaced by a forward shift (the exchange steps are their own inverse), so every
// operand meets the dimensions from 0 upwards.
// The operand address of the item held by a module during HIGHSHEAVES is derived from the
// number of shifts already made: after s backward shifts position p holds the item whose
// low address is (p+s) mod 2^r. During LOOPOPER, before UNSHUFFLE(j), position q holds the
// item whose address is q with its low j+1 bits reversed (worked out from the definition of
// UNSHUFFLE and checked against the r = 3 example of the schedule).
package ccc_pkg;

  // Address and dimension field widths (k + q <= 16 operands' address bits).
  localparam int AW = 16;
  localparam int DW = 5;

  // Modulus and generator for the number-theoretic FFT butterfly: 65537 = 2^16 + 1 is prime
  // and 3 generates its multiplicative group, so a primitive 2^k-th root of unity exists for
  // every k <= 16.
  localparam longint unsigned MODP = 65537;
  localparam longint unsigned GEN  = 3;

  typedef enum logic [1:0] {
    OP_NOP  = 2'd0,   // OPER leaves both operands unchanged
    OP_CMPX = 2'd1,   // oriented compare-exchange (bitonic merge / sort)
    OP_BFLY = 2'd2,   // radix-2 FFT butterfly modulo MODP
    OP_SHFT = 2'd3    // cyclic shift of the whole array by +2^obit
  } op_e;

  // Operation selected for one pass. ascend = 0 runs DESCEND (dimensions from the top
  // down), ascend = 1 runs ASCEND (from dimension 0 up). OPER acts only on dimensions
  // j <= jmax; the compare-exchange direction is bit obit of the lower operand's address
  // (0 if obit >= k+q). inv selects the inverse root w^-1 for the butterfly.
  typedef struct packed {
    logic          inv;
    logic          ascend;
    op_e           op;
    logic [DW-1:0] jmax;
    logic [DW-1:0] obit;
  } cfg_t;

  typedef enum logic [2:0] {
    ACT_NONE   = 3'd0,  // keep the operand
    ACT_LAT    = 3'd1,  // exchange over L, then OPER
    ACT_FROM_F = 3'd2,  // take the operand arriving on F (backward shift / exchange)
    ACT_FROM_B = 3'd3,  // take the operand arriving on B (exchange)
    ACT_CYC    = 3'd4,  // exchange with the cycle neighbour, then OPER
    ACT_LOCAL  = 3'd5   // OPER on two words of the private RAM
  } act_e;

  // Decoded action of one module at one step: what to do, the cube dimension of the OPER
  // and the original address of the operand the module holds (within the cycle level, before
  // the private-RAM index is appended).
  typedef struct packed {
    act_e          act;
    logic [DW-1:0] j;
    logic [AW-1:0] item;
  } step_t;

  // Reverse the low nb bits of q, keep the bits above.
  function automatic int revlow(int q, int nb);
    int res;
    res = (q >> nb) << nb;
    for (int b = 0; b < nb; b++)
      if (((q >> b) & 1) != 0) res |= 1 << (nb - 1 - b);
    return res;
  endfunction

  // Role of position p in one exchange step of UNSHUFFLE(., i) with loop variable b:
  // positions m = (2s+1)*2^i + d, -b < d < b, d = b (mod 2), exchange with m-1.
  function automatic act_e swap_role(int i, int b, int p);
    int blk, d;
    blk = 1 << (i + 1);
    d = (p % blk) - (1 << i);
    if (d > -b && d < b && ((d - b) % 2) == 0) return ACT_FROM_B;
    d = ((p + 1) % blk) - (1 << i);
    if (d > -b && d < b && ((d - b) % 2) == 0) return ACT_FROM_F;
    return ACT_NONE;
  endfunction

  // Number of steps of LOOPOPER for cycles of 2^r modules.
  function automatic int low_steps(int r);
    return (2 << r) - r - 2;
  endfunction

  // Number of steps of one CCC DESCEND pass (HIGHSHEAVES + LOWSHEAVES).
  function automatic int ccc_steps(int r);
    return 4 * (1 << r) + low_steps(r);
  endfunction

  // Action of module (l, p) at step s of the DESCEND pass on a CCC with 2^k modules in
  // cycles of 2^r; sheaves exist only for p < k - r.
  function automatic step_t decode_step(int k, int r, int l, int p, int s);
    step_t d;
    int c, i, lo, hi, off, n, t;
    c = 1 << r;
    d.act  = ACT_NONE;
    d.j    = '0;
    d.item = '0;
    if (s < 4 * c) begin
      if ((s % 2) == 1) begin
        d.act = ACT_FROM_F;
      end else begin
        i  = c - 1 - s / 2;
        lo = (i > 0) ? i : 0;
        hi = (i < 0) ? c + i : c;
        if (p >= lo && p < hi && p < k - r) begin
          d.act  = ACT_LAT;
          d.j    = DW'(p + r);
          d.item = AW'(l * c + ((p - i - 1 + 2 * c) % c));
        end
      end
    end else begin
      t = s - 4 * c;
      off = 0;
      // BRP = UNSHUFFLE(r-1) ... UNSHUFFLE(1)
      for (int ii = r - 1; ii >= 1; ii--) begin
        n = (1 << ii) - 1;
        if (t >= off && t < off + n) d.act = swap_role(ii, (1 << ii) - (t - off), p);
        off += n;
      end
      for (int jj = r - 1; jj >= 0; jj--) begin
        if (t == off) begin
          d.act  = ACT_CYC;
          d.j    = DW'(jj);
          d.item = AW'(l * c + revlow(p, jj + 1));
        end
        off += 1;
        n = (1 << jj) - 1;
        if (t >= off && t < off + n) d.act = swap_role(jj, (1 << jj) - (t - off), p);
        off += n;
      end
    end
    return d;
  endfunction

  // (a * b) mod MODP
  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b);
    return (a * b) % MODP;
  endfunction

  // Primitive root of unity of order 2^kt modulo MODP.
  function automatic longint unsigned root_of_unity(int kt);
    longint unsigned w;
    w = GEN;
    for (int i = kt; i < 16; i++) w = mulmod(w, w);
    return w;
  endfunction

endpackage
