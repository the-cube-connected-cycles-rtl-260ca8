// Program of one CCC module: a time counter and a decoder of what to do at each time unit.
//
// The module at address (l, p) counts time units t after a start pulse and, from l, p and t
// alone, decides whether to do nothing, to take a neighbour's operand, or to exchange
// operands and apply OPER. The decision is the schedule of ccc_pkg::decode_step (lateral
// sheaves with backward shifts, then LOOPOPER inside the cycle). The decisions for all steps
// are tabulated at elaboration time, so in hardware the program is a small constant table
// indexed by the step number.
//
// With a private RAM of 2^Q operands per module (Q > 0) every step of that schedule is
// repeated for RAM words 0 .. 2^Q-1, one word per clock, and the pass ends with LOCAL:
// for j = Q-1 down to 0, for i = 0 .. 2^Q-1, OPER on words i and i + 2^j when bit j of i is 0.
// Cube dimensions seen by the array are then raised by Q and the global operand address is
// (module address) * 2^Q + word index.
//
// With ascend = 1 the same program runs backwards: LOCAL first with j = 0 .. Q-1, then the
// CCC steps in reverse order, a backward shift becoming a forward shift (take from B), so
// the dimensions are met from 0 upwards.
//
// Timing: start is a one-cycle pulse while idle. busy is high for exactly
// ccc_steps(R) * 2^Q + Q * 2^Q clocks, during which st/idx/idx2 describe the current time
// unit; done pulses for one clock after the last one. The time unit count follows the
// DESCEND schedule; one step per clock (an exchange and an OPER both fit in one clock) is
// this design's choice. With Q = 0 there is a single word and idx/idx2 are constant 0.
module ccc_ctrl
  import ccc_pkg::*;
#(
  parameter int K     = 6,   // log2 of the number of modules
  parameter int R     = 2,   // log2 of the cycle length
  parameter int Q     = 0,   // log2 of the private RAM size (0: one operand per module)
  parameter int L_IDX = 0,   // cycle number l of this module
  parameter int P_IDX = 0,   // position p of this module in its cycle
  localparam int IW   = (Q > 0) ? Q : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          ascend,  // run the schedule backwards (ASCEND); hold during a pass
  output logic          busy,
  output logic          done,
  output step_t         st,     // action, global dimension, global operand address
  output logic [IW-1:0] idx,    // RAM word used by this time unit
  output logic [IW-1:0] idx2    // second RAM word (LOCAL only)
);

  localparam int NSTEP = ccc_steps(R);
  localparam int NCCC  = NSTEP << Q;
  localparam int TOTAL = NCCC + (Q << Q);
  localparam int TW    = $clog2(TOTAL + 1);
  localparam int MADDR = (L_IDX << R) | P_IDX;

  // The program of this module: its action at every step of the CCC schedule, worked out
  // at elaboration time from its address (l, p).
  typedef step_t [NSTEP-1:0] prog_t;

  function automatic prog_t make_prog();
    prog_t pr;
    for (int s = 0; s < NSTEP; s++) pr[s] = decode_step(K, R, L_IDX, P_IDX, s);
    return pr;
  endfunction

  localparam prog_t PROG = make_prog();

  logic [TW-1:0] t;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (int'(t) == TOTAL - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          t    <= '0;
        end else begin
          t <= t + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        t    <= '0;
      end
    end
  end

  always_comb begin
    step_t d;
    int    s, w, u, lj, li;
    st   = '{act: ACT_NONE, j: '0, item: '0};
    idx  = '0;
    idx2 = '0;
    d    = '{act: ACT_NONE, j: '0, item: '0};
    s = 0; w = 0; u = 0; lj = 0; li = 0;
    if (busy) begin
      // position of this clock in the DESCEND order: ASCEND runs LOCAL first, then the
      // CCC steps in reverse
      u = ascend ? ((int'(t) < (Q << Q)) ? NCCC + int'(t) : NCCC - 1 - (int'(t) - (Q << Q)))
                 : int'(t);
      if (u < NCCC) begin
        s = u >> Q;
        w = ascend ? ((int'(t) - (Q << Q)) & ((1 << Q) - 1)) : (u & ((1 << Q) - 1));
        d = PROG[s];
        if (ascend && s < 4 * (1 << R) && d.act == ACT_FROM_F) d.act = ACT_FROM_B;
        st.act  = d.act;
        st.j    = DW'(int'(d.j) + Q);
        st.item = AW'((int'(d.item) << Q) | w);
        idx     = IW'(w);
        idx2    = IW'(w);
      end else begin
        u  = u - NCCC;
        lj = ascend ? (u >> Q) : Q - 1 - (u >> Q);
        li = u & ((1 << Q) - 1);
        if (((li >> lj) & 1) == 0) begin
          st.act  = ACT_LOCAL;
          st.j    = DW'(lj);
          st.item = AW'((MADDR << Q) | li);
          idx     = IW'(li);
          idx2    = IW'(li + (1 << lj));
        end
      end
    end
  end

endmodule
