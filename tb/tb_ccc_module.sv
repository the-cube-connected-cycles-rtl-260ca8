// Test of the processing module (ccc_module) with a private RAM of 4 words (Q = 2): two
// modules form the smallest array, one cycle of two (K = R = 1), holding 8 operands.
// The pass then exercises the cycle exchange, the backward shift, the cycle OPER with the
// partner on F (module 0) and on B (module 1), and the LOCAL phase on the RAM.
// Checks the RAM contents after each pass against a flat software DESCEND or ASCEND
// (random operations in both orders, an FFT checked against a direct DFT, a bitonic sort),
// the pass length, and that the link outputs carry the word the program points at.
module tb_ccc_module;
  import ccc_pkg::*;
  import tb_ccc_ref_pkg::*;

  localparam int K  = 1;
  localparam int R  = 1;
  localparam int Q  = 2;
  localparam int W  = 17;
  localparam int S  = 1 << Q;
  localparam int KT = K + Q;
  localparam int NT = 2 * S;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         load_en = 1'b0;
  cfg_t         cfg;
  logic [W-1:0] ld [2][S];
  logic [W-1:0] dq [2][S];
  logic [W-1:0] f_out [2], b_out [2], l_out [2];
  logic [W-1:0] zero = '0;
  logic         busy [2], done [2];

  for (genvar p = 0; p < 2; p++) begin : g_m
    ccc_module #(.K(K), .R(R), .Q(Q), .W(W), .L_IDX(0), .P_IDX(p)) u_mod (
      .clk, .rst_n, .start, .cfg, .load_en,
      .load_data (ld[p]),
      .data_out  (dq[p]),
      .f_in      (b_out[1 - p]),
      .b_in      (f_out[1 - p]),
      .l_in      (zero),
      .f_out     (f_out[p]),
      .b_out     (b_out[p]),
      .l_out     (l_out[p]),
      .busy      (busy[p]),
      .done      (done[p])
    );
  end

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic load(input longint unsigned d[]);
    for (int i = 0; i < NT; i++) ld[i / S][i % S] = W'(d[i]);
    @(negedge clk) load_en = 1'b1;
    @(negedge clk) load_en = 1'b0;
  endtask

  task automatic run_pass(input int op, input int jmax, input int obit, input bit asc = 1'b0);
    int nclk;
    cfg = '{inv: 1'b0, ascend: asc, op: op_e'(op), jmax: DW'(jmax), obit: DW'(obit)};
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    nclk = 0;
    while (!done[0]) begin
      if (busy[0]) begin
        nclk++;
        // all ports of a module carry the word of the current time unit
        checks++;
        if (f_out[0] != dq[0][g_m[0].u_mod.idx] || l_out[1] != dq[1][g_m[1].u_mod.idx]
            || b_out[1] != f_out[1]) failures++;
      end
      @(negedge clk);
    end
    // 8 + 1 steps of 4 words, then LOCAL: 2 sweeps of 4 words
    checks++;
    if (nclk != 9 * S + Q * S || !done[1]) begin
      failures++;
      $display("FAIL pass length %0d", nclk);
    end
  endtask

  task automatic compare(input longint unsigned exp[], input string what);
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (longint'(dq[i / S][i % S]) != exp[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s: operand %0d = %0d, expected %0d", what, i, dq[i / S][i % S], exp[i]);
      end
    end
  endtask

  initial begin
    longint unsigned a[], e[], srt[];
    a = new[NT];
    for (int i = 0; i < NT; i++) ld[i / S][i % S] = '0;
    cfg = '{inv: 1'b0, ascend: 1'b0, op: OP_NOP, jmax: '0, obit: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 20; n++) begin
      int op, jm, ob;
      bit asc;
      asc = n >= 12;
      op = (n < 3 || n == 12) ? n % 12 + 2 * int'(asc) : $urandom_range(0, 3);
      jm = (n < 3) ? KT - 1 : $urandom_range(0, KT - 1);
      ob = $urandom_range(0, KT);
      for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 65536);
      e = a;
      if (asc) ref_ascend(e, op, jm, ob, KT);
      else ref_descend(e, op, jm, ob, KT);
      load(a);
      run_pass(op, jm, ob, asc);
      compare(e, $sformatf("pass ascend=%0d op=%0d jmax=%0d obit=%0d", asc, op, jm, ob));
    end

    for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 65536);
    load(a);
    run_pass(2, KT - 1, 0);
    for (int x = 0; x < NT; x++) begin
      int y;
      y = bitrev(x, KT);
      checks++;
      if (longint'(dq[y / S][y % S]) != dft_at(a, KT, x)) begin
        failures++;
        $display("FAIL DFT coefficient %0d", x);
      end
    end

    for (int i = 0; i < NT; i++) a[i] = $urandom_range(0, 500);
    srt = a;
    srt.sort();
    load(a);
    for (int s = 0; s < KT; s++) run_pass(1, s, s + 1);
    compare(srt, "bitonic sort");

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
