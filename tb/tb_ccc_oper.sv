// Test of the basic operation unit (ccc_oper) at its default size (K+Q = 6, 17-bit operands).
// Worked cases first: a butterfly on the top dimension (root power 1) and on dimension 0 of
// address 0 and 32, and the same for the ASCEND form; both compare directions; a dimension
// above jmax; OP_NOP; the cyclic-shift exchange in both pass orders; the inverse butterfly. Then random operands, addresses, dimensions, settings and butterfly
// forms compared with the reference OPER.
module tb_ccc_oper;
  import ccc_pkg::*;
  import tb_ccc_ref_pkg::*;

  localparam int KT = 6;
  localparam int W  = 17;

  cfg_t          cfg;
  logic [DW-1:0] j;
  logic [AW-1:0] m;
  logic [W-1:0]  u, v, u_o, v_o;

  ccc_oper dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic apply(input int op, input int jm, input int ob, input int jj, input int mm,
                       input longint unsigned uu, input longint unsigned vv,
                       input longint unsigned eu, input longint unsigned ev,
                       input int asc = 0, input int inv = 0);
    cfg.inv = inv[0];
    cfg.ascend = asc[0];
    cfg.op = op_e'(op);
    cfg.jmax = DW'(jm);
    cfg.obit = DW'(ob);
    j = DW'(jj);
    m = AW'(mm);
    u = W'(uu);
    v = W'(vv);
    #1;
    checks++;
    if (longint'(u_o) != eu || longint'(v_o) != ev) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d j=%0d m=%0d u=%0d v=%0d -> %0d %0d, expected %0d %0d",
                 op, jj, mm, uu, vv, u_o, v_o, eu, ev);
    end
  endtask

  initial begin
    longint unsigned w;
    w = omega(KT);
    // butterfly, top dimension: root power 1
    apply(2, 5, 0, 5, 3, 100, 7, 107, 93);
    apply(2, 5, 0, 5, 0, 5, 65536, 4, 6);
    // butterfly, dimension 0, address 0: rev(0) = 0 -> root power 1
    apply(2, 5, 0, 0, 0, 10, 20, 30, 65527);
    // dimension 0, address 32: rev = 1, root power w^(1 * 1)
    apply(2, 5, 0, 0, 32, 0, 1, w, 65537 - w);
    // compare-exchange ascending and descending (direction from bit 3 of m)
    apply(1, 5, 3, 1, 0, 9, 4, 4, 9);
    apply(1, 5, 3, 1, 8, 4, 9, 9, 4);
    apply(1, 5, 6, 1, 8, 9, 4, 4, 9);
    // dimension above jmax, and no operation
    apply(1, 1, 6, 2, 0, 9, 4, 9, 4);
    apply(0, 5, 0, 2, 0, 9, 4, 9, 4);
    // ASCEND butterfly: dimension 0 has root power 1, dimension 5 at address 1 has w
    apply(2, 5, 0, 0, 7, 10, 20, 30, 65527, 1);
    apply(2, 5, 0, 5, 1, 0, 1, w, 65537 - w, 1);
    // cyclic shift by 1 at dimension 2: DESCEND swaps when bits 1..0 are 11, ASCEND when 00;
    // by 2 (obit = 1): bit 0 is ignored
    apply(3, 5, 0, 2, 3, 5, 6, 6, 5);
    apply(3, 5, 0, 2, 1, 5, 6, 5, 6);
    apply(3, 5, 0, 2, 0, 5, 6, 6, 5, 1);
    apply(3, 5, 0, 2, 3, 5, 6, 5, 6, 1);
    apply(3, 5, 1, 2, 2, 5, 6, 6, 5);
    apply(3, 5, 1, 0, 0, 5, 6, 5, 6);
    // inverse butterfly, dimension 0, address 32: root power w^-1
    apply(2, 5, 0, 0, 32, 0, 1, powmod(w, P - 2), P - powmod(w, P - 2), 0, 1);
    apply(2, 5, 0, 0, 0, 10, 20, 30, 65527, 0, 1);
    for (int n = 0; n < 3000; n++) begin
      int op, jm, ob, jj, mm, asc, inv;
      longint unsigned uu, vv, eu, ev;
      op = $urandom_range(0, 3);
      jm = $urandom_range(0, KT - 1);
      ob = $urandom_range(0, KT);
      jj = $urandom_range(0, KT - 1);
      mm = $urandom_range(0, (1 << KT) - 1) & ~(1 << jj);
      uu = $urandom_range(0, 65536);
      vv = $urandom_range(0, 65536);
      asc = $urandom_range(0, 1);
      inv = $urandom_range(0, 1);
      eu = uu;
      ev = vv;
      ref_oper(op, jm, ob, KT, jj, mm, eu, ev, asc, inv);
      apply(op, jm, ob, jj, mm, uu, vv, eu, ev, asc, inv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
