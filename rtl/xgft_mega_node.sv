// xgft_mega_node: mega-switch node of stage STAGE.
//
// One switch block whose crossbar joins every input to every output: inputs
// are C_UR[0..m_L-1] then P_DR[0..w_L-1], outputs C_DR[0..m_L-1] then
// P_UR[0..w_L-1]. It runs the TB shortest-path algorithm. Root switches
// (STAGE = h) need no parent ports, so there the switch block has only the
// m_h child ports; the parent port signals of a root node are kept for a
// uniform interface and are idle (p_out never valid, p_in never ready).
// Structure and routing follow the described node.
module xgft_mega_node
  import xgft_pkg::*;
#(
  parameter int STAGE = 1,
  localparam int NC  = M[STAGE],
  localparam int NP  = W[STAGE],
  localparam int NPS = (STAGE == H) ? 0 : NP     // parent ports in use
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
  link_t sin        [NC + NPS];
  logic  sin_ready  [NC + NPS];
  link_t sout       [NC + NPS];
  logic  sout_ready [NC + NPS];

  xgft_switch_block #(
    .KIND(SW_MEGA), .STAGE(STAGE), .N_IN(NC + NPS), .N_OUT(NC + NPS)
  ) u_sw (
    .clk, .rst_n, .in(sin), .in_ready(sin_ready), .out(sout), .out_ready(sout_ready)
  );

  for (genvar c = 0; c < NC; c++) begin : g_c
    assign sin[c]        = c_in[c];
    assign c_in_ready[c] = sin_ready[c];
    assign c_out[c]      = sout[c];
    assign sout_ready[c] = c_out_ready[c];
  end
  for (genvar j = 0; j < NP; j++) begin : g_p
    if (NPS > 0) begin : g_used
      assign sin[NC + j]        = p_in[j];
      assign p_in_ready[j]      = sin_ready[NC + j];
      assign p_out[j]           = sout[NC + j];
      assign sout_ready[NC + j] = p_out_ready[j];
    end else begin : g_idle
      assign p_in_ready[j] = 1'b0;
      assign p_out[j]      = '0;
    end
  end
endmodule
