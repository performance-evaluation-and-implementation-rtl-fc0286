// xgft_top: the two XGFT networks of the design, side by side.
//
// Both are XGFT(3; 4,3,5; 2,2,2) with 60 leaves:
//   - dual_*: built from dual-switch nodes with one turn-back channel each,
//     routed with Turn-Back-When-Possible (adaptive, non-minimal: a packet
//     whose turn-back channel is reserved climbs further and turns back at a
//     higher stage, ultimately over the root loop-back links);
//   - mega_*: built from mega-switch nodes, routed with Turn-Back (adaptive
//     upward, shortest path: it turns at the nearest common ancestor).
// Every leaf has an injection channel through a source adapter, which turns
// the plain destination number of a header into the encoded address used
// inside the network and stamps the encoded source address, and an ejection
// channel straight from the network (its headers carry encoded addresses).
// Channels are valid/ready, one 32-bit word per clock; a packet is a header
// word followed by payload words, its length in the header.
module xgft_top
  import xgft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  link_t dual_in        [NLEAF],
  output logic  dual_in_ready  [NLEAF],
  output link_t dual_out       [NLEAF],
  input  logic  dual_out_ready [NLEAF],
  input  link_t mega_in        [NLEAF],
  output logic  mega_in_ready  [NLEAF],
  output link_t mega_out       [NLEAF],
  input  logic  mega_out_ready [NLEAF]
);
  link_t dual_enc [NLEAF];
  logic  dual_enc_ready [NLEAF];
  link_t mega_enc [NLEAF];
  logic  mega_enc_ready [NLEAF];

  for (genvar d = 0; d < NLEAF; d++) begin : g_src
    xgft_src_adapter #(.SRC(d)) u_dual_src (
      .clk, .rst_n, .in(dual_in[d]), .in_ready(dual_in_ready[d]),
      .out(dual_enc[d]), .out_ready(dual_enc_ready[d])
    );
    xgft_src_adapter #(.SRC(d)) u_mega_src (
      .clk, .rst_n, .in(mega_in[d]), .in_ready(mega_in_ready[d]),
      .out(mega_enc[d]), .out_ready(mega_enc_ready[d])
    );
  end

  xgft_network #(.NODE(NODE_DUAL), .N_TBC(N_TBC_DEFAULT)) u_dual (
    .clk, .rst_n,
    .leaf_in(dual_enc), .leaf_in_ready(dual_enc_ready),
    .leaf_out(dual_out), .leaf_out_ready(dual_out_ready)
  );

  xgft_network #(.NODE(NODE_MEGA)) u_mega (
    .clk, .rst_n,
    .leaf_in(mega_enc), .leaf_in_ready(mega_enc_ready),
    .leaf_out(mega_out), .leaf_out_ready(mega_out_ready)
  );
endmodule
