// xgft_dual_node: dual-switch node of stage STAGE.
//
// Two switch blocks: the up-routing switch takes packets from the m_L child
// ports (C_UR) and sends them to the w_L parent ports (P_UR) or, through
// N_TBC turn-back channels, to the down-routing switch; the down-routing
// switch takes packets from the parent ports (P_DR) and the turn-back
// channels and sends them to the child ports (C_DR). The up-routing switch
// runs TBWP part 1, the down-routing switch part 2. In the root stage the
// parent ports have no parent; the network loops each P_UR[j] back to P_DR[j]
// of the same node, which adds w_h extra turn-back paths.
// The turn-back channels are plain valid/ready channels between the output
// buffer of one half and the input buffer of the other. Structure and
// routing follow the described node; the channel handshake is this design's.
module xgft_dual_node
  import xgft_pkg::*;
#(
  parameter int STAGE = 1,
  parameter int N_TBC = N_TBC_DEFAULT,
  localparam int NC = M[STAGE],
  localparam int NP = W[STAGE]
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t c_in        [NC],   // C_UR
  output logic  c_in_ready  [NC],
  output link_t c_out       [NC],   // C_DR
  input  logic  c_out_ready [NC],
  output link_t p_out       [NP],   // P_UR
  input  logic  p_out_ready [NP],
  input  link_t p_in        [NP],   // P_DR
  output logic  p_in_ready  [NP]
);
  link_t up_out       [NP + N_TBC];
  logic  up_out_ready [NP + N_TBC];
  link_t dn_in        [NP + N_TBC];
  logic  dn_in_ready  [NP + N_TBC];

  xgft_switch_block #(
    .KIND(SW_UP), .STAGE(STAGE), .N_IN(NC), .N_OUT(NP + N_TBC), .N_TBC(N_TBC)
  ) u_up (
    .clk, .rst_n, .in(c_in), .in_ready(c_in_ready),
    .out(up_out), .out_ready(up_out_ready)
  );

  xgft_switch_block #(
    .KIND(SW_DOWN), .STAGE(STAGE), .N_IN(NP + N_TBC), .N_OUT(NC), .N_TBC(N_TBC)
  ) u_down (
    .clk, .rst_n, .in(dn_in), .in_ready(dn_in_ready),
    .out(c_out), .out_ready(c_out_ready)
  );

  for (genvar j = 0; j < NP; j++) begin : g_p
    assign p_out[j]        = up_out[j];
    assign up_out_ready[j] = p_out_ready[j];
    assign dn_in[j]        = p_in[j];
    assign p_in_ready[j]   = dn_in_ready[j];
  end
  for (genvar t = 0; t < N_TBC; t++) begin : g_tbc
    assign dn_in[NP + t]        = up_out[NP + t];
    assign up_out_ready[NP + t] = dn_in_ready[NP + t];
  end
endmodule
