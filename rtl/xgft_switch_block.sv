// xgft_switch_block: wormhole input-output buffered crossbar switch block.
//
// N_IN input port blocks and N_OUT output port blocks joined by a crossbar.
// Each input port requests at most one output per clock (chosen by its
// routing decision function among free outputs); each output grants one of
// its requesters with rotating priority and is then reserved for that packet
// until its last word has entered the output buffer. Because every output is
// owned by at most one input, the crossbar is an AND-OR selection.
// KIND selects the routing function: SW_UP (TBWP part 1, outputs P_UR then
// turn-back channels), SW_DOWN (part 2, outputs C_DR) or SW_MEGA (TB; inputs
// C_UR then P_DR, outputs C_DR then P_UR). Latency through an idle block is
// two clocks per word (input buffer, output buffer); throughput is one word
// per clock per port. The structure (IP, crossbar, OP, round-robin
// arbitration, eight-word buffers) follows the described switch model; the
// single-cycle request/grant allocation is this design's own.
module xgft_switch_block
  import xgft_pkg::*;
#(
  parameter sw_kind_e KIND  = SW_MEGA,
  parameter int       STAGE = 1,
  parameter int       N_IN  = M[1] + W[1],
  parameter int       N_OUT = M[1] + W[1],
  parameter int       N_TBC = N_TBC_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in        [N_IN],
  output logic  in_ready  [N_IN],
  output link_t out       [N_OUT],
  input  logic  out_ready [N_OUT]
);
  logic [N_OUT-1:0] req       [N_IN];
  logic             gnt       [N_IN];
  logic             xv        [N_IN];
  logic [N_OUT-1:0] xsel      [N_IN];
  word_t            xdata     [N_IN];
  logic             xlast     [N_IN];

  logic [N_OUT-1:0] out_busy, out_free, out_space;
  logic [N_IN-1:0]  ogrant    [N_OUT];
  logic [N_OUT-1:0] release_o;

  assign out_free = ~out_busy;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    xgft_input_port #(
      .KIND(KIND), .STAGE(STAGE), .N_OUT(N_OUT), .N_TBC(N_TBC),
      .FROM_CHILD(i < M[STAGE])
    ) u_ip (
      .clk, .rst_n,
      .in(in[i]), .in_ready(in_ready[i]),
      .out_free, .req(req[i]), .gnt(gnt[i]),
      .out_space,
      .xfer_valid(xv[i]), .xfer_sel(xsel[i]), .xfer_data(xdata[i]), .xfer_last(xlast[i])
    );
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic [N_IN-1:0] oreq;
    logic            push;
    word_t           wdata;
    logic            space;

    always_comb begin
      for (int i = 0; i < N_IN; i++) oreq[i] = req[i][o] && out_free[o];
    end

    xgft_rr_arbiter #(.N(N_IN)) u_arb (
      .clk, .rst_n, .req(oreq), .advance(1'b1), .grant(ogrant[o])
    );

    // crossbar column
    always_comb begin
      push         = 1'b0;
      wdata        = '0;
      release_o[o] = 1'b0;
      for (int i = 0; i < N_IN; i++) begin
        if (xv[i] && xsel[i][o]) begin
          push         = 1'b1;
          wdata        = wdata | xdata[i];
          release_o[o] = xlast[i];
        end
      end
    end

    xgft_output_port u_op (
      .clk, .rst_n, .push, .wdata, .space,
      .out(out[o]), .out_ready(out_ready[o])
    );
    assign out_space[o] = space;
  end

  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      gnt[i] = 1'b0;
      for (int o = 0; o < N_OUT; o++) gnt[i] = gnt[i] | ogrant[o][i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_busy <= '0;
    else begin
      for (int o = 0; o < N_OUT; o++)
        out_busy[o] <= (out_busy[o] | (|ogrant[o])) & ~release_o[o];
    end
  end

  // At most one input drives each crossbar column.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < N_OUT; o++) begin
        int n;
        n = 0;
        for (int i = 0; i < N_IN; i++) if (xv[i] && xsel[i][o]) n++;
        assert (n <= 1) else $error("xgft_switch_block: two inputs on output %0d", o);
      end
    end
  end
endmodule
