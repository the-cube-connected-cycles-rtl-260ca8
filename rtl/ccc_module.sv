// One processing module of the cube-connected-cycles array.
//
// A module holds its operands in a register file of 2^Q words (one operand register T when
// Q = 0, a private RAM when the array is smaller than the data, N = 2^Q * n). It has three
// operand ports: F (forward, to the next module of its cycle), B (backward, to the previous
// one) and L (lateral, to the module of another cycle across one cube dimension). Each port
// is a pair of one-operand buses, one per direction, so a link carries an operand both ways
// in the same clock.
//
// Every clock of a pass, ccc_ctrl says what to do with word idx:
//   ACT_FROM_F / ACT_FROM_B   replace it by the operand arriving on F / B (shift, exchange)
//   ACT_LAT / ACT_CYC         exchange it over L / over F or B and apply OPER; the module
//                             keeps the half of the result that belongs to its own address
//   ACT_LOCAL                 apply OPER to words idx and idx2 of its own RAM
// Which neighbour is the partner in ACT_CYC, and which OPER output is kept, follows from bit
// j of the operand's address: 0 means this module holds U (partner on F), 1 means V (partner
// on B). Both ends of a link compute OPER, so no result has to be sent back.
// All three output ports carry word idx; a neighbour only samples it when its own program
// says so.
//
// Loading: load_en (while idle) writes load_data into the RAM. data_out shows the RAM.
// Timing: one time unit per clock, see ccc_ctrl.
module ccc_module
  import ccc_pkg::*;
#(
  parameter int K     = 6,
  parameter int R     = 2,
  parameter int Q     = 0,
  parameter int W     = 17,
  parameter int L_IDX = 0,
  parameter int P_IDX = 0,
  localparam int S    = 1 << Q
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  cfg_t         cfg,
  input  logic         load_en,
  input  logic [W-1:0] load_data [S],
  output logic [W-1:0] data_out  [S],
  input  logic [W-1:0] f_in,
  input  logic [W-1:0] b_in,
  input  logic [W-1:0] l_in,
  output logic [W-1:0] f_out,
  output logic [W-1:0] b_out,
  output logic [W-1:0] l_out,
  output logic         busy,
  output logic         done
);

  localparam int IW = (Q > 0) ? Q : 1;

  step_t         st;
  logic [IW-1:0] idx, idx2;
  logic [W-1:0]  mem [S];
  logic [W-1:0]  mine, other, partner;
  logic [W-1:0]  op_u, op_v, res_u, res_v;
  logic          upper;
  logic [AW-1:0] m_u;

  ccc_ctrl #(.K(K), .R(R), .Q(Q), .L_IDX(L_IDX), .P_IDX(P_IDX)) u_ctrl (
    .clk, .rst_n, .start, .ascend (cfg.ascend), .busy, .done, .st, .idx, .idx2
  );

  assign mine  = mem[int'(idx) % S];
  assign other = mem[int'(idx2) % S];
  assign f_out = mine;
  assign b_out = mine;
  assign l_out = mine;

  always_comb begin
    upper = st.item[st.j[3:0]];
    m_u   = st.item;
    m_u[st.j[3:0]] = 1'b0;
    unique case (st.act)
      ACT_LAT: partner = l_in;
      ACT_CYC: partner = upper ? b_in : f_in;
      default: partner = other;
    endcase
    if (st.act == ACT_LOCAL) begin
      op_u = mine;
      op_v = other;
    end else begin
      op_u = upper ? partner : mine;
      op_v = upper ? mine : partner;
    end
  end

  ccc_oper #(.KT(K + Q), .W(W)) u_oper (
    .cfg, .j(st.j), .m(m_u), .u(op_u), .v(op_v), .u_o(res_u), .v_o(res_v)
  );

  always_ff @(posedge clk) begin
    if (!busy && load_en) begin
      mem <= load_data;
    end else begin
      unique case (st.act)
        ACT_FROM_F: mem[int'(idx) % S] <= f_in;
        ACT_FROM_B: mem[int'(idx) % S] <= b_in;
        ACT_LAT, ACT_CYC: mem[int'(idx) % S] <= upper ? res_v : res_u;
        ACT_LOCAL: begin
          mem[int'(idx) % S]  <= res_u;
          mem[int'(idx2) % S] <= res_v;
        end
        default: ;
      endcase
    end
  end

  assign data_out = mem;

  // A lateral exchange only happens on positions that own a sheaf.
  a_lat_sheaf: assert property (@(posedge clk) disable iff (!rst_n)
    st.act == ACT_LAT |-> P_IDX < K - R);
  // The RAM is only loaded between passes.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    load_en |-> !busy);

endmodule
