// Worked example of a DESCEND pass on the smallest regular CCC: K = 3, four cycles of two
// modules (R = 1). Records, at every time unit, which operand pairs the modules combine
// (address of the lower operand and dimension) and the arrangement of the operands after
// every step, and compares them with the pass worked out by hand:
//   step 0  OPER on 1-5, 3-7                 (dimension 2, position 1 only)
//   step 1  backward shift: 1 0 3 2 5 4 7 6
//   step 2  OPER on 1-3, 5-7 (dimension 1) and 0-4, 2-6 (dimension 2)
//   step 3  backward shift: 0 1 2 3 4 5 6 7
//   step 4  OPER on 0-2, 4-6                 (dimension 1)
//   step 6  no OPER; step 8: OPER on 0-1, 2-3, 4-5, 6-7 (dimension 0, inside the cycles)
// Each operand must thus meet dimensions 2, 1, 0 in this order.
module tb_ccc_fig5;
  import ccc_pkg::*;

  localparam int K  = 3;
  localparam int R  = 1;
  localparam int W  = 17;
  localparam int NT = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         load_en = 1'b0;
  cfg_t         cfg;
  logic [W-1:0] data_in  [NT];
  logic [W-1:0] data_out [NT];
  logic         busy, done;

  ccc_top #(.K(K), .R(R), .Q(0), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // pairs[step] = bit mask over (lower address * 4 + dimension)
  logic [31:0] pairs [16];
  int          arr   [16][NT];

  for (genvar m = 0; m < NT; m++) begin : g_m
    always @(posedge clk) begin
      step_t s;
      int st_n;
      s = dut.g_cyc[m / 2].u_cyc.g_mod[m % 2].u_mod.st;
      st_n = int'(dut.g_cyc[m / 2].u_cyc.g_mod[m % 2].u_mod.u_ctrl.t);
      if (busy && (s.act == ACT_LAT || s.act == ACT_CYC) && s.item[s.j] == 1'b0)
        pairs[st_n][int'(s.item) * 4 + int'(s.j)] <= 1'b1;
    end
  end

  function automatic logic [31:0] pm(input int lst[$][2]);
    logic [31:0] r = '0;
    foreach (lst[i]) r[lst[i][0] * 4 + lst[i][1]] = 1'b1;
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int nclk;
    logic [31:0] exp [16];
    cfg = '{inv: 1'b0, ascend: 1'b0, op: OP_NOP, jmax: 5'd2, obit: 5'd3};
    for (int i = 0; i < 16; i++) begin pairs[i] = '0; exp[i] = '0; end
    for (int i = 0; i < NT; i++) data_in[i] = W'(i);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) load_en = 1'b1;
    @(negedge clk) load_en = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    nclk = 0;
    while (!done) begin
      if (busy) begin
        for (int i = 0; i < NT; i++) arr[nclk][i] = int'(data_out[i]);
        nclk++;
      end
      @(negedge clk);
    end
    for (int i = 0; i < NT; i++) arr[nclk][i] = int'(data_out[i]);

    exp[0] = pm('{'{1, 2}, '{3, 2}});
    exp[2] = pm('{'{1, 1}, '{5, 1}, '{0, 2}, '{2, 2}});
    exp[4] = pm('{'{0, 1}, '{4, 1}});
    exp[8] = pm('{'{0, 0}, '{2, 0}, '{4, 0}, '{6, 0}});
    chk(nclk == 9, $sformatf("pass length %0d, expected 4 * 2 + 1", nclk));
    for (int s = 0; s < 9; s++)
      chk(pairs[s] == exp[s], $sformatf("operand pairs at step %0d: %h, expected %h", s, pairs[s], exp[s]));
    begin
      int a1 [NT] = '{1, 0, 3, 2, 5, 4, 7, 6};
      for (int i = 0; i < NT; i++) begin
        chk(arr[2][i] == a1[i], $sformatf("arrangement after first shift, position %0d", i));
        chk(arr[4][i] == i, $sformatf("arrangement after second shift, position %0d", i));
        chk(arr[9][i] == i, $sformatf("arrangement at the end, position %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
