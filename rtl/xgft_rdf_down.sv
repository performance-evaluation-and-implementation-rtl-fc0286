// xgft_rdf_down: down-routing decision in stage STAGE (part 2 of TBWP, used
// in the down-routing half of a dual-switch node).
//
// The destination field d_L is cut out of the encoded destination address in
// the header and selects output C_DR[d_L]; cand is that port as a one-hot
// vector over the m_L child ports. No arithmetic: the field is a fixed bit
// slice. A field value of m_L or more cannot occur for a valid encoded
// address and gives an all-zero cand (the packet then waits forever, which
// a testbench sees as a lost packet).
module xgft_rdf_down
  import xgft_pkg::*;
#(
  parameter int STAGE = 1,
  localparam int NC = M[STAGE]
) (
  input  word_t         hdr,
  output logic [NC-1:0] cand
);
  localparam int KL = k_of(STAGE);
  localparam int OL = off_of(STAGE);

  logic [KL-1:0] d_l;
  assign d_l = hdr[OL +: KL];

  always_comb begin
    cand = '0;
    for (int c = 0; c < NC; c++) cand[c] = (d_l == KL'(c));
  end
endmodule
