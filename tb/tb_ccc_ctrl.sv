// Test of the module program (ccc_ctrl) on its own: one controller per module of a CCC with
// K = 5, R = 2, Q = 1 (8 cycles of 4, position 3 without sheaf, two words per module).
// The testbench moves address tags between the modules exactly as the decoded actions say
// (take from F, take from B, keep) and checks, clock by clock, that
//   - a module that operates reports the address of the tag it really holds,
//   - its partner (across L, along the cycle, or in its own RAM) operates in the same clock
//     on the address that differs in bit j only,
//   - an exchange inside a cycle is matched by the opposite move of the neighbour.
//     (DESCEND only; an ASCEND pass shifts forward, both neighbours taking from B).
// At the end every tag must be back at its home word and have seen every dimension
// exactly once, in the order K+Q-1 .. 0 for a DESCEND pass and 0 .. K+Q-1 for an ASCEND
// pass, and the pass must have lasted the number of clocks the schedule gives.
// A DESCEND pass is run first, then an ASCEND pass.
module tb_ccc_ctrl;
  import ccc_pkg::*;

  localparam int K  = 5;
  localparam int R  = 2;
  localparam int Q  = 1;
  localparam int KT = K + Q;
  localparam int NL = 1 << (K - R);
  localparam int C  = 1 << R;
  localparam int S  = 1 << Q;
  localparam int NM = NL * C;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic ascend = 1'b0;

  logic  busy_v [NM];
  logic  done_v [NM];
  step_t st_v   [NM];
  logic [Q-1:0] idx_v [NM];
  logic [Q-1:0] idx2_v[NM];

  for (genvar m = 0; m < NM; m++) begin : g_m
    ccc_ctrl #(.K(K), .R(R), .Q(Q), .L_IDX(m / C), .P_IDX(m % C)) u_ctrl (
      .clk, .rst_n, .start, .ascend,
      .busy (busy_v[m]), .done (done_v[m]), .st (st_v[m]), .idx (idx_v[m]), .idx2 (idx2_v[m])
    );
  end

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int tag  [NM][S];
  int nseen[NM*S];
  int last [NM*S];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int mod_of(int l, int p);
    return l * C + ((p % C + C) % C);
  endfunction

  // dimension expected after dimension lj
  function automatic int next_dim(int lj);
    return ascend ? lj + 1 : lj - 1;
  endfunction

  task automatic run_pass(input bit asc);
    int clocks, nt [NM][S];
    ascend = asc;
    for (int m = 0; m < NM; m++) for (int w = 0; w < S; w++) tag[m][w] = m * S + w;
    for (int a = 0; a < NM * S; a++) begin nseen[a] = 0; last[a] = asc ? -1 : KT; end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    clocks = 0;
    while (busy_v[0]) begin
      clocks++;
      nt = tag;
      for (int m = 0; m < NM; m++) begin
        int l, p, w, w2, j, it, pm;
        l  = m / C;
        p  = m % C;
        w  = int'(idx_v[m]);
        w2 = int'(idx2_v[m]);
        j  = int'(st_v[m].j);
        it = int'(st_v[m].item);
        chk(busy_v[m], "all modules busy together");
        chk(w == int'(idx_v[0]) || st_v[m].act == ACT_LOCAL, "same word in all modules");
        case (st_v[m].act)
          ACT_FROM_F: begin
            nt[m][w] = tag[mod_of(l, p + 1)][w];
          end
          ACT_FROM_B: begin
            nt[m][w] = tag[mod_of(l, p - 1)][w];
            if (!asc)
              chk(st_v[mod_of(l, p - 1)].act == ACT_FROM_F, "exchange matched by neighbour");
          end
          ACT_LAT, ACT_CYC: begin
            chk(it == tag[m][w], $sformatf("module %0d reports item %0d holds %0d", m, it, tag[m][w]));
            if (st_v[m].act == ACT_LAT) pm = mod_of(l ^ (1 << p), p);
            else pm = mod_of(l, p ^ 1);
            chk(st_v[pm].act == st_v[m].act && int'(st_v[pm].j) == j
                && int'(st_v[pm].item) == (it ^ (1 << j)), "partner operates on mate");
            chk(next_dim(last[it]) == j, $sformatf("item %0d dimension %0d in order", it, j));
            last[it] = j;
            nseen[it]++;
          end
          ACT_LOCAL: begin
            chk(it == tag[m][w], "LOCAL item");
            chk(tag[m][w2] == (it ^ (1 << j)) && ((it >> j) & 1) == 0, "LOCAL mate");
            chk(next_dim(last[it]) == j && next_dim(last[it ^ (1 << j)]) == j, "LOCAL order");
            last[it] = j;
            last[it ^ (1 << j)] = j;
            nseen[it]++;
            nseen[it ^ (1 << j)]++;
          end
          default: ;
        endcase
      end
      tag = nt;
      @(negedge clk);
    end
    chk(done_v[0], "done pulse after the pass");
    begin
      int exp_steps = 4 * C;
      for (int i = R - 1; i >= 1; i--) exp_steps += (1 << i) - 1;
      for (int j = R - 1; j >= 0; j--) exp_steps += (1 << j);
      chk(clocks == exp_steps * S + Q * S, $sformatf("pass clocks %0d", clocks));
    end
    for (int m = 0; m < NM; m++)
      for (int w = 0; w < S; w++) chk(tag[m][w] == m * S + w, "tag back home");
    for (int a = 0; a < NM * S; a++)
      chk(nseen[a] == KT && last[a] == (asc ? KT - 1 : 0), "every dimension once");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_pass(1'b0);
    run_pass(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
