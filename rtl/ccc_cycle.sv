// One cycle of the cube-connected-cycles array: 2^R modules (l, 0) .. (l, 2^R-1) joined
// in a ring. Port F of module p is linked to port B of module (p+1) mod 2^R, which makes
// the ring the path of the backward cyclic shift and of the neighbour exchanges of LOOPOPER.
// The lateral ports of the modules are brought out as l_in / l_out, indexed by position p,
// for the array to join cycles across cube dimension p.
//
// load_data / data_out are indexed by (p * 2^Q + word). busy is high while any module runs and done
// pulses when all finish; all modules run programs of the same length, so they start and
// end together.
module ccc_cycle
  import ccc_pkg::*;
#(
  parameter int K     = 6,
  parameter int R     = 2,
  parameter int Q     = 0,
  parameter int W     = 17,
  parameter int L_IDX = 0,
  localparam int C    = 1 << R,
  localparam int S    = 1 << Q
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  cfg_t         cfg,
  input  logic         load_en,
  input  logic [W-1:0] load_data [C*S],
  output logic [W-1:0] data_out  [C*S],
  input  logic [W-1:0] l_in      [C],
  output logic [W-1:0] l_out     [C],
  output logic         busy,
  output logic         done
);

  logic [W-1:0] f_out [C];
  logic [W-1:0] b_out [C];
  logic [C-1:0] busy_v, done_v;

  for (genvar p = 0; p < C; p++) begin : g_mod
    logic [W-1:0] ld [S];
    logic [W-1:0] dq [S];
    for (genvar w = 0; w < S; w++) begin : g_w
      assign ld[w] = load_data[p*S + w];
      assign data_out[p*S + w] = dq[w];
    end
    ccc_module #(.K(K), .R(R), .Q(Q), .W(W), .L_IDX(L_IDX), .P_IDX(p)) u_mod (
      .clk, .rst_n, .start, .cfg, .load_en,
      .load_data (ld),
      .data_out  (dq),
      .f_in      (b_out[(p + 1) % C]),
      .b_in      (f_out[(p + C - 1) % C]),
      .l_in      (l_in[p]),
      .f_out     (f_out[p]),
      .b_out     (b_out[p]),
      .l_out     (l_out[p]),
      .busy      (busy_v[p]),
      .done      (done_v[p])
    );
  end

  assign busy = |busy_v;
  assign done = &done_v;

endmodule
