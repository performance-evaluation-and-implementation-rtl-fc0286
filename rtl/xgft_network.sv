// xgft_network: the whole XGFT(h; m_1..m_h; w_1..w_h) built from switch nodes.
//
// NODE selects dual-switch nodes (TBWP routing, N_TBC turn-back channels per
// node) or mega-switch nodes (TB routing). The structure is generated by the
// top-down recursive rules, unrolled into flat index arithmetic:
//   - switch s of stage L belongs to sub-XGFT p = s div R_L of height L and
//     is its root number r = s mod R_L, where R_L = w_1*..*w_{L-1};
//   - parent port j of that switch is port k = r*w_L + j of the sub-XGFT;
//     the sub-XGFT is child c = p mod m_{L+1} of sub-XGFT p div m_{L+1} of
//     height L+1, and its port k goes to child port c of root switch k
//     (P_UR[c][k] -> C_UR[k][c] upward, C_DR[k][c] -> P_DR[c][k] downward);
//   - leaf D is child port D mod m_1 of stage-1 switch D div m_1.
// Every channel between stage L and L+1 has the flat index
// choff_of(L) + s*w_L + j in the up and down channel arrays. In the root
// stage each P_UR[j] is looped back to P_DR[j] of the same switch, the
// arrangement used for the evaluation (in a mega-switch network those ports
// are idle). Leaf channels use encoded addresses in their headers.
module xgft_network
  import xgft_pkg::*;
#(
  parameter node_kind_e NODE  = NODE_DUAL,
  parameter int         N_TBC = N_TBC_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t leaf_in        [NLEAF],   // from leaf D to the network
  output logic  leaf_in_ready  [NLEAF],
  output link_t leaf_out       [NLEAF],   // from the network to leaf D
  input  logic  leaf_out_ready [NLEAF]
);
  link_t up    [NCH_ALL];
  logic  up_rd [NCH_ALL];
  link_t dn    [NCH_ALL];
  logic  dn_rd [NCH_ALL];

  for (genvar L = 1; L <= H; L++) begin : g_st
    localparam int NC = M[L];
    localparam int NP = W[L];
    localparam int RL = roots_of(L);

    for (genvar s = 0; s < nsw_of(L); s++) begin : g_sw
      localparam int P = s / RL;
      localparam int R = s % RL;

      link_t c_in [NC];  logic c_in_ready [NC];
      link_t c_out[NC];  logic c_out_ready[NC];
      link_t p_out[NP];  logic p_out_ready[NP];
      link_t p_in [NP];  logic p_in_ready [NP];

      if (NODE == NODE_DUAL) begin : g_dual
        xgft_dual_node #(.STAGE(L), .N_TBC(N_TBC)) u_node (
          .clk, .rst_n,
          .c_in, .c_in_ready, .c_out, .c_out_ready,
          .p_out, .p_out_ready, .p_in, .p_in_ready
        );
      end else begin : g_mega
        xgft_mega_node #(.STAGE(L)) u_node (
          .clk, .rst_n,
          .c_in, .c_in_ready, .c_out, .c_out_ready,
          .p_out, .p_out_ready, .p_in, .p_in_ready
        );
      end

      // child side
      for (genvar c = 0; c < NC; c++) begin : g_c
        if (L == 1) begin : g_leaf
          localparam int D = P * NC + c;
          assign c_in[c]          = leaf_in[D];
          assign leaf_in_ready[D] = c_in_ready[c];
          assign leaf_out[D]      = c_out[c];
          assign c_out_ready[c]   = leaf_out_ready[D];
        end else begin : g_sub
          localparam int PC = P * NC + c;               // child sub-XGFT, height L-1
          localparam int RC = R / W[L-1];               // its root switch
          localparam int JC = R % W[L-1];               // that switch's parent port
          localparam int CH = choff_of(L - 1) + (PC * roots_of(L - 1) + RC) * W[L-1] + JC;
          assign c_in[c]        = up[CH];
          assign up_rd[CH]      = c_in_ready[c];
          assign dn[CH]         = c_out[c];
          assign c_out_ready[c] = dn_rd[CH];
        end
      end

      // parent side
      for (genvar j = 0; j < NP; j++) begin : g_p
        localparam int CH = choff_of(L) + s * NP + j;
        assign up[CH]         = p_out[j];
        assign p_out_ready[j] = up_rd[CH];
        assign p_in[j]        = dn[CH];
        assign dn_rd[CH]      = p_in_ready[j];
        if (L == H) begin : g_loop
          // root stage: P_UR[j] feeds P_DR[j] of the same switch
          assign dn[CH]    = up[CH];
          assign up_rd[CH] = dn_rd[CH];
        end
      end
    end
  end
endmodule
