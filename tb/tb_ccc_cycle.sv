// Test of one cycle (ccc_cycle) of 8 modules used as a complete array (K = R = 3, no
// lateral links), so that the whole DESCEND pass is the in-cycle part LOOPOPER.
// With each operand equal to its address and OPER disabled, the arrangement of the cycle is
// checked at the two points of the LOOPOPER schedule with a known order: after the
// bit-reversal permutation, 0 4 2 6 1 5 3 7, and after UNSHUFFLE(2), 0 2 1 3 4 6 5 7; the
// order must be natural again at the end. Then an FFT (checked against a direct DFT), a
// bitonic sort and random passes are compared with a flat software DESCEND, and random
// ASCEND passes with a flat software ASCEND.
module tb_ccc_cycle;
  import ccc_pkg::*;
  import tb_ccc_ref_pkg::*;

  localparam int K  = 3;
  localparam int R  = 3;
  localparam int W  = 17;
  localparam int C  = 1 << R;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         load_en = 1'b0;
  cfg_t         cfg;
  logic [W-1:0] load_data [C];
  logic [W-1:0] data_out  [C];
  logic [W-1:0] l_in      [C];
  logic [W-1:0] l_out     [C];
  logic         busy, done;

  ccc_cycle #(.K(K), .R(R), .Q(0), .W(W), .L_IDX(0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int snap [64][C];
  int nclk;

  task automatic load(input longint unsigned d[]);
    for (int i = 0; i < C; i++) load_data[i] = W'(d[i]);
    @(negedge clk) load_en = 1'b1;
    @(negedge clk) load_en = 1'b0;
  endtask

  task automatic run_pass(input int op, input int jmax, input int obit, input bit asc = 1'b0);
    cfg = '{inv: 1'b0, ascend: asc, op: op_e'(op), jmax: DW'(jmax), obit: DW'(obit)};
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    nclk = 0;
    while (!done) begin
      if (busy) begin
        for (int i = 0; i < C; i++) snap[nclk][i] = int'(data_out[i]);
        nclk++;
      end
      @(negedge clk);
    end
    checks++;
    if (nclk != 4 * C + 11) begin
      failures++;
      $display("FAIL pass length %0d", nclk);
    end
  endtask

  task automatic compare(input longint unsigned exp[], input string what);
    for (int i = 0; i < C; i++) begin
      checks++;
      if (longint'(data_out[i]) != exp[i]) begin
        failures++;
        $display("FAIL %s: operand %0d = %0d, expected %0d", what, i, data_out[i], exp[i]);
      end
    end
  endtask

  task automatic check_order(input int at, input int exp[C], input string what);
    for (int i = 0; i < C; i++) begin
      checks++;
      if (snap[at][i] != exp[i]) begin
        failures++;
        $display("FAIL %s: position %0d holds %0d, expected %0d", what, i, snap[at][i], exp[i]);
      end
    end
  endtask

  initial begin
    longint unsigned a[], e[], srt[];
    a = new[C];
    for (int i = 0; i < C; i++) begin l_in[i] = '0; load_data[i] = '0; end
    cfg = '{inv: 1'b0, ascend: 1'b0, op: OP_NOP, jmax: '0, obit: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // data movement of LOOPOPER
    for (int i = 0; i < C; i++) a[i] = i;
    load(a);
    run_pass(0, 2, 0);
    check_order(4 * C + 3 + 1, '{0, 4, 2, 6, 1, 5, 3, 7}, "after BRP");
    check_order(4 * C + 4 + 1 + 3, '{0, 2, 1, 3, 4, 6, 5, 7}, "after UNSHUFFLE(2)");
    compare(a, "identity");

    // FFT of 8 points
    for (int i = 0; i < C; i++) a[i] = $urandom_range(0, 65536);
    e = a;
    ref_descend(e, 2, K - 1, 0, K);
    load(a);
    run_pass(2, K - 1, 0);
    compare(e, "FFT pass");
    for (int x = 0; x < C; x++) begin
      checks++;
      if (longint'(data_out[bitrev(x, K)]) != dft_at(a, K, x)) begin
        failures++;
        $display("FAIL DFT coefficient %0d", x);
      end
    end

    // bitonic sort
    for (int i = 0; i < C; i++) a[i] = $urandom_range(0, 1000);
    srt = a;
    srt.sort();
    load(a);
    for (int s = 0; s < K; s++) run_pass(1, s, s + 1);
    compare(srt, "bitonic sort");

    // random passes
    for (int n = 0; n < 16; n++) begin
      int op, jm, ob;
      bit asc;
      asc = n >= 10;
      op = $urandom_range(0, 3);
      jm = $urandom_range(0, K - 1);
      ob = $urandom_range(0, K);
      for (int i = 0; i < C; i++) a[i] = $urandom_range(0, 65536);
      e = a;
      if (asc) ref_ascend(e, op, jm, ob, K);
      else ref_descend(e, op, jm, ob, K);
      load(a);
      run_pass(op, jm, ob, asc);
      compare(e, asc ? "random ASCEND pass" : "random pass");
    end

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
