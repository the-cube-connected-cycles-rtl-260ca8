// Test of the CCC array at its default size: 64 modules (K = 6) in 16 cycles of 4 (R = 2),
// one operand per module. The array is instantiated with no parameter override; the local
// constants below only restate its defaults for the reference model.
//
// Runs, each checked against a flat software DESCEND and the pass length against the
// schedule's step count:
//   - bitonic merge of a bitonic sequence (one pass, result must be sorted),
//   - a full bitonic sort (K+Q passes with growing jmax and orientation bit),
//   - an FFT modulo 65537 (one pass, checked against a direct DFT, output bit-reversed),
//   - random passes with random operation, jmax and orientation bit,
//   - an ASCEND FFT (input in bit-reversed order, output in natural order, checked against a
//     direct DFT) and random ASCEND passes, checked against a flat software ASCEND,
//   - a cyclic convolution: forward DESCEND FFTs of two sequences (output bit-reversed),
//     pointwise products formed here, an inverse ASCEND FFT (input bit-reversed, output
//     natural), scaling by 1/N here; checked against a direct convolution,
//   - cyclic shifts by 2^i, whole array and within blocks, DESCEND and ASCEND, checked
//     against a direct rotation.
// Counts how often each mechanism of the schedule happened (lateral OPER, backward shift,
// UNSHUFFLE exchange, forward shift of an ASCEND pass, cycle OPER, dimensions masked by
// jmax, both compare directions) and fails on any that never did.
module tb_ccc_top_full;
  import ccc_pkg::*;
  import tb_ccc_ref_pkg::*;

  localparam int K  = 6;
  localparam int R  = 2;
  localparam int Q  = 0;
  localparam int W  = 17;
  localparam int KT = K + Q;
  localparam int NT = 1 << KT;
  localparam int NL = 1 << (K - R);
  localparam int C  = 1 << R;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         load_en = 1'b0;
  cfg_t         cfg;
  logic [W-1:0] data_in  [NT];
  logic [W-1:0] data_out [NT];
  logic         busy, done;

  ccc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // per-module action counters: [l][p][act]
  int cnt [NL][C][8];
  int n_idle_nosheaf = 0;
  int n_masked = 0;
  int n_up = 0, n_down = 0;
  int n_fwd = 0;
  int n_rot = 0;
  int n_inv = 0;

  for (genvar l = 0; l < NL; l++) begin : g_l
    for (genvar p = 0; p < C; p++) begin : g_p
      always @(posedge clk) begin
        if (dut.g_cyc[l].u_cyc.g_mod[p].u_mod.busy)
          cnt[l][p][int'(dut.g_cyc[l].u_cyc.g_mod[p].u_mod.st.act)]++;
        // forward shifts: ASCEND steps of the sheaf phase taking the operand from B
        if (dut.g_cyc[l].u_cyc.g_mod[p].u_mod.busy && cfg.ascend &&
            dut.g_cyc[l].u_cyc.g_mod[p].u_mod.st.act == ACT_FROM_B &&
            int'(dut.g_cyc[l].u_cyc.g_mod[p].u_mod.u_ctrl.t) >= expected_clocks() - (4 * C << Q))
          n_fwd++;
      end
    end
  end

  function automatic int sum_act(act_e a);
    int s = 0;
    for (int l = 0; l < NL; l++) for (int p = 0; p < C; p++) s += cnt[l][p][int'(a)];
    return s;
  endfunction

  // clocks of one pass: HIGHSHEAVES 2 * 2^(R+1) steps, BRP (UNSHUFFLE(i) takes 2^i - 1 steps
  // for i = R-1..1), then per j = R-1..0 one OPER step and UNSHUFFLE(j); each step repeated for
  // the 2^Q words; then LOCAL, Q sweeps over the 2^Q words.
  function automatic int expected_clocks();
    int s = 4 * (1 << R);
    for (int i = R - 1; i >= 1; i--) s += (1 << i) - 1;
    for (int j = R - 1; j >= 0; j--) s += 1 + (1 << j) - 1;
    return s * (1 << Q) + Q * (1 << Q);
  endfunction

  task automatic load(input longint unsigned d[]);
    for (int i = 0; i < NT; i++) data_in[i] = W'(d[i]);
    @(negedge clk) load_en = 1'b1;
    @(negedge clk) load_en = 1'b0;
  endtask

  task automatic run_pass(input int op, input int jmax, input int obit, input bit asc = 1'b0,
                          input bit inv = 1'b0);
    int clocks = 0;
    cfg.ascend = asc;
    cfg.inv = inv;
    if (inv) n_inv++;
    cfg.op   = op_e'(op);
    cfg.jmax = DW'(jmax);
    cfg.obit = DW'(obit);
    if (jmax < KT - 1) n_masked++;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      if (busy) clocks++;
      @(negedge clk);
    end
    checks++;
    if (clocks != expected_clocks()) begin
      failures++;
      $display("FAIL pass length %0d, expected %0d", clocks, expected_clocks());
    end
  endtask

  task automatic compare(input longint unsigned exp[], input string what);
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (longint'(data_out[i]) != exp[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s: operand %0d = %0d, expected %0d", what, i, data_out[i], exp[i]);
      end
    end
  endtask

  // count compare directions the reference uses in one compare-exchange pass
  task automatic count_dirs(input int jmax, input int obit);
    for (int j = 0; j <= jmax && j < KT; j++)
      for (int m = 0; m < NT; m++)
        if (((m >> j) & 1) == 0) begin
          if (obit < KT && ((m >> obit) & 1) == 1) n_down++;
          else n_up++;
        end
  endtask

  initial begin
    longint unsigned a[], e[], srt[];
    a = new[NT];
    e = new[NT];
    cfg = '{inv: 1'b0, ascend: 1'b0, op: OP_NOP, jmax: '0, obit: '0};
    for (int i = 0; i < NT; i++) data_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. bitonic merge: increasing first half, decreasing second half
    for (int i = 0; i < NT / 2; i++) a[i] = 2 * i + 1;
    for (int i = NT / 2; i < NT; i++) a[i] = 2 * (NT - i);
    e = a;
    ref_descend(e, 1, KT - 1, KT, KT);
    load(a);
    run_pass(1, KT - 1, KT);
    count_dirs(KT - 1, KT);
    compare(e, "bitonic merge");
    for (int i = 1; i < NT; i++) begin
      checks++;
      if (data_out[i] < data_out[i-1]) failures++;
    end

    // 2. bitonic sort of random keys
    for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 131071);
    srt = a;
    srt.sort();
    e = a;
    load(a);
    for (int s = 0; s < KT; s++) begin
      ref_descend(e, 1, s, s + 1, KT);
      run_pass(1, s, s + 1);
      count_dirs(s, s + 1);
      compare(e, $sformatf("bitonic sort stage %0d", s));
    end
    compare(srt, "sorted output");

    // 3. FFT modulo 65537
    for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 65536);
    e = a;
    ref_descend(e, 2, KT - 1, 0, KT);
    load(a);
    run_pass(2, KT - 1, 0);
    compare(e, "FFT pass");
    for (int x = 0; x < NT; x++) begin
      checks++;
      if (longint'(data_out[bitrev(x, KT)]) != dft_at(a, KT, x)) begin
        failures++;
        $display("FAIL DFT coefficient %0d", x);
      end
    end

    // 4. random passes
    for (int n = 0; n < 6; n++) begin
      int op, jm, ob;
      op = $urandom_range(0, 3);
      jm = $urandom_range(0, KT - 1);
      ob = $urandom_range(0, KT);
      for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 65536);
      e = a;
      ref_descend(e, op, jm, ob, KT);
      load(a);
      run_pass(op, jm, ob);
      compare(e, $sformatf("random pass op=%0d jmax=%0d obit=%0d", op, jm, ob));
    end

    // 5. ASCEND FFT: coefficients loaded in bit-reversed order, transform in natural order
    for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 65536);
    for (int i = 0; i < NT; i++) e[i] = a[bitrev(i, KT)];
    load(e);
    ref_ascend(e, 2, KT - 1, 0, KT);
    run_pass(2, KT - 1, 0, 1'b1);
    compare(e, "ASCEND FFT pass");
    for (int x = 0; x < NT; x++) begin
      checks++;
      if (longint'(data_out[x]) != dft_at(a, KT, x)) begin
        failures++;
        $display("FAIL ASCEND DFT coefficient %0d", x);
      end
    end

    // 6. random ASCEND passes
    for (int n = 0; n < 4; n++) begin
      int op, jm, ob;
      op = $urandom_range(0, 3);
      jm = $urandom_range(0, KT - 1);
      ob = $urandom_range(0, KT);
      for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 65536);
      e = a;
      ref_ascend(e, op, jm, ob, KT);
      load(a);
      run_pass(op, jm, ob, 1'b1);
      compare(e, $sformatf("random ASCEND pass op=%0d jmax=%0d obit=%0d", op, jm, ob));
    end
    // 7. cyclic convolution of two sequences of small numbers
    begin
      longint unsigned b[], fa[], fb[], c[];
      longint unsigned ninv;
      b = new[NT];
      fa = new[NT];
      fb = new[NT];
      c = new[NT];
      for (int i = 0; i < NT; i++) begin a[i] = $urandom_range(0, 30); b[i] = $urandom_range(0, 30); end
      load(a);
      run_pass(2, KT - 1, 0);
      for (int i = 0; i < NT; i++) fa[i] = longint'(data_out[i]);
      load(b);
      run_pass(2, KT - 1, 0);
      for (int i = 0; i < NT; i++) fb[i] = longint'(data_out[i]);
      for (int i = 0; i < NT; i++) c[i] = (fa[i] * fb[i]) % P;
      load(c);
      run_pass(2, KT - 1, 0, 1'b1, 1'b1);
      ninv = powmod(NT, P - 2);
      for (int x = 0; x < NT; x++) begin
        longint unsigned s;
        s = 0;
        for (int i = 0; i < NT; i++) s += a[i] * b[(x - i + NT) % NT];
        checks++;
        if ((longint'(data_out[x]) * ninv) % P != s) begin
          failures++;
          if (failures < 10) $display("FAIL convolution term %0d", x);
        end
      end
    end

    // 8. cyclic shifts: whole array by 1 and by 2^i, blocks of 2^(jm+1) by 2^i
    for (int n = 0; n < 6; n++) begin
      int jm, ob;
      bit asc;
      asc = n[0];
      jm = (n < 4) ? KT - 1 : $urandom_range(1, KT - 2);
      ob = (n < 2) ? 0 : $urandom_range(0, jm);
      for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 131071);
      e = a;
      ref_rotate(e, jm, ob, KT);
      load(a);
      run_pass(3, jm, ob, asc);
      compare(e, $sformatf("cyclic shift by %0d in blocks of %0d, ascend=%0d", 1 << ob, 2 << jm, asc));
      n_rot++;
    end
    cfg.ascend = 1'b0;

    // mechanisms
    for (int p = K - R; p < C; p++)
      for (int l = 0; l < NL; l++) n_idle_nosheaf += cnt[l][p][int'(ACT_NONE)];
    $display("lateral OPER %0d, backward shift %0d, unshuffle exchange %0d, cycle OPER %0d, LOCAL OPER %0d",
             sum_act(ACT_LAT), sum_act(ACT_FROM_F), sum_act(ACT_FROM_B), sum_act(ACT_CYC),
             sum_act(ACT_LOCAL));
    $display("idle at missing sheaf %0d, masked passes %0d, ascending %0d, descending %0d, forward shift %0d, cyclic shift passes %0d, inverse FFT passes %0d",
             n_idle_nosheaf, n_masked, n_up, n_down, n_fwd, n_rot, n_inv);
    checks += 12;
    if (n_inv == 0)               begin failures++; $display("FAIL no inverse FFT pass"); end
    if (n_rot == 0)               begin failures++; $display("FAIL no cyclic shift pass"); end
    if (n_fwd == 0)               begin failures++; $display("FAIL no forward shift"); end
    if (sum_act(ACT_LAT) == 0)    begin failures++; $display("FAIL no lateral OPER"); end
    if (sum_act(ACT_FROM_F) == 0) begin failures++; $display("FAIL no shift"); end
    if (sum_act(ACT_FROM_B) == 0) begin failures++; $display("FAIL no unshuffle exchange"); end
    if (sum_act(ACT_CYC) == 0)    begin failures++; $display("FAIL no cycle OPER"); end
    // without a private RAM there is no LOCAL phase, and K = R + 2^R leaves no position
    // without a sheaf
    if (sum_act(ACT_LOCAL) != 0)  begin failures++; $display("FAIL LOCAL OPER with Q = 0"); end
    if (n_idle_nosheaf != 0)      begin failures++; $display("FAIL idle position without sheaf"); end
    if (n_masked == 0)            begin failures++; $display("FAIL no masked pass"); end
    if (n_up == 0)                begin failures++; $display("FAIL no ascending compare"); end
    if (n_down == 0)              begin failures++; $display("FAIL no descending compare"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
