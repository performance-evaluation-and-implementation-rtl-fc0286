// xgft_rdf_tb: routing decision of the Turn-Back (TB) shortest-path algorithm
// in a mega-switch node of stage STAGE.
//
// Outputs of a mega-switch are C_DR[0..m_L-1] followed by P_UR[0..w_L-1]
// (the root stage has no P_UR ports). For a header that entered through a
// C_UR port (FROM_CHILD = 1): if the fields s_h..s_{L+1} and d_h..d_{L+1}
// are equal, or the node is a root, the packet turns down through C_DR[d_L];
// otherwise any free P_UR port is a candidate. A header that entered through
// a P_DR port always goes down through C_DR[d_L]. The packet therefore turns
// at the first (nearest) common ancestor, which makes the route a shortest
// path. 'turn' flags a turn from up-routing to down-routing.
module xgft_rdf_tb
  import xgft_pkg::*;
#(
  parameter int STAGE      = 1,
  parameter bit FROM_CHILD = 1'b1,
  localparam int NC   = M[STAGE],
  localparam int NP   = (STAGE == H) ? 0 : W[STAGE],
  localparam int NOUT = NC + NP
) (
  input  word_t           hdr,
  input  logic [NOUT-1:0] out_free,
  output logic [NOUT-1:0] cand,
  output logic            turn
);
  localparam enc_t PMASK = prefix_mask(STAGE);
  localparam int   KL    = k_of(STAGE);
  localparam int   OL    = off_of(STAGE);

  logic [NOUT-1:0] down_sel;
  logic            common;

  logic [KL-1:0] d_l;
  assign d_l = hdr[OL +: KL];

  // source and destination fields that differ
  enc_t diff;
  assign diff = hdr[2*ENC_W-1:ENC_W] ^ hdr[ENC_W-1:0];

  always_comb begin
    down_sel = '0;
    for (int c = 0; c < NC; c++) down_sel[c] = (d_l == KL'(c));
    common = (diff & PMASK) == '0;
    turn   = FROM_CHILD && common;
    if (!FROM_CHILD || common) cand = down_sel;
    else                       cand = out_free & ~NOUT'((1 << NC) - 1);
  end
endmodule
