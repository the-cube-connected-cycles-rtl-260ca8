// Cube-connected-cycles (CCC) processor array.
//
// n = 2^K identical modules, addressed m = l * 2^R + p, are grouped into 2^(K-R) cycles of
// 2^R modules (ccc_cycle). The cycles are joined as a (K-R)-dimensional cube: the L port of
// module (l, p) is linked to the L port of module (l xor 2^p, p), so sheaf p, the set of
// lateral links along cube dimension p, only touches modules in position p. Positions
// p >= K-R (when K < R + 2^R) have no lateral link. Every module has exactly three links,
// and there are 3 * 2^(K-1) links when K = R + 2^R.
//
// A pass runs one DESCEND algorithm over all N = 2^(K+Q) operands: OPER is applied to every
// pair of operands whose addresses differ in bit j, for j = K+Q-1 down to 0, with the
// operation chosen by cfg (see ccc_oper). With cfg.ascend = 1 the pass is an ASCEND
// algorithm instead, j = 0 up to K+Q-1, in the same number of clocks.
// Operand g = m * 2^Q + i sits in word i of module m before and after the pass.
//
// Interface: while idle, load_en writes data_in into all modules in one clock and data_out
// always shows the operands. A one-clock start pulse launches a pass; busy stays high for
// ccc_steps(R) * 2^Q + Q * 2^Q clocks and done pulses once at the end. cfg must be held
// during the pass.
module ccc_top
  import ccc_pkg::*;
#(
  parameter int K  = 6,    // log2 of the number of modules (n = 64)
  parameter int R  = 2,    // log2 of the cycle length (K = R + 2^R)
  parameter int Q  = 0,    // log2 of the operands per module
  parameter int W  = 17,   // operand width
  localparam int NL = 1 << (K - R),
  localparam int C  = 1 << R,
  localparam int S  = 1 << Q,
  localparam int NT = NL * C * S
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  cfg_t         cfg,
  input  logic         load_en,
  input  logic [W-1:0] data_in  [NT],
  output logic [W-1:0] data_out [NT],
  output logic         busy,
  output logic         done
);

  logic [W-1:0]  lat_out [NL][C];
  logic [W-1:0]  lat_in  [NL][C];
  logic [NL-1:0] busy_v, done_v;

  for (genvar l = 0; l < NL; l++) begin : g_cyc
    logic [W-1:0] ld [C*S];
    logic [W-1:0] dq [C*S];
    for (genvar x = 0; x < C * S; x++) begin : g_x
      assign ld[x] = data_in[l*C*S + x];
      assign data_out[l*C*S + x] = dq[x];
    end
    for (genvar p = 0; p < C; p++) begin : g_lat
      if (p < K - R) begin : g_sheaf
        assign lat_in[l][p] = lat_out[l ^ (1 << p)][p];
      end else begin : g_none
        assign lat_in[l][p] = '0;
      end
    end
    ccc_cycle #(.K(K), .R(R), .Q(Q), .W(W), .L_IDX(l)) u_cyc (
      .clk, .rst_n, .start, .cfg, .load_en,
      .load_data (ld),
      .data_out  (dq),
      .l_in      (lat_in[l]),
      .l_out     (lat_out[l]),
      .busy      (busy_v[l]),
      .done      (done_v[l])
    );
  end

  assign busy = |busy_v;
  assign done = &done_v;

  // The address split needs every cube dimension covered by a sheaf.
  initial begin
    if (K - R > (1 << R) || K < R)
      $fatal(1, "ccc_top: need R <= K <= R + 2^R (K=%0d R=%0d)", K, R);
  end

endmodule
