// xgft_rdf_tbwp_up: routing decision of the Turn-Back-When-Possible (TBWP)
// algorithm in the up-routing switch of a dual-switch node in stage STAGE.
//
// The output ports of the up-routing switch are numbered P_UR[0..w_L-1]
// followed by the turn-back channels TB[0..N_TBC-1]. A header is a candidate
// for a turn-back channel when this node is a common ancestor of source and
// destination, i.e. when the encoded fields s_h..s_{L+1} and d_h..d_{L+1}
// are equal (always true in the top stage). Then:
//   - if some turn-back channel is free, the candidates are the free
//     turn-back channels (in the top stage also the free P_UR ports, whose
//     channels are looped back to the down-routing half),
//   - otherwise the candidates are the free P_UR ports (the packet climbs
//     further and turns back higher up).
// When the node is not a common ancestor the candidates are the free P_UR
// ports. The decision is purely combinational: one masked equality compare.
// Outputs: cand (candidate outputs), common (ancestor test) and bypass (a
// common ancestor whose turn-back channels are all reserved, so the packet is
// sent upward instead).
module xgft_rdf_tbwp_up
  import xgft_pkg::*;
#(
  parameter int STAGE = 1,
  parameter int N_TBC = N_TBC_DEFAULT,
  localparam int NP   = W[STAGE],
  localparam int NOUT = NP + N_TBC
) (
  input  word_t           hdr,
  input  logic [NOUT-1:0] out_free,
  output logic [NOUT-1:0] cand,
  output logic            common,
  output logic            bypass
);
  localparam enc_t PMASK = prefix_mask(STAGE);
  localparam logic [NOUT-1:0] P_SET  = NOUT'((1 << NP) - 1);
  localparam logic [NOUT-1:0] TB_SET = ~P_SET;
  localparam bit   TOP = (STAGE == H);

  logic tb_free;

  // source and destination fields that differ
  enc_t diff;
  assign diff = hdr[2*ENC_W-1:ENC_W] ^ hdr[ENC_W-1:0];

  always_comb begin
    common  = (diff & PMASK) == '0;
    tb_free = |(out_free & TB_SET);
    bypass  = 1'b0;
    if (common && tb_free)
      cand = out_free & (TOP ? (TB_SET | P_SET) : TB_SET);
    else begin
      cand   = out_free & P_SET;
      bypass = common && !TOP;
    end
  end
endmodule
