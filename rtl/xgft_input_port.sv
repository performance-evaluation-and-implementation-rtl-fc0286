// xgft_input_port: input port block (IP) of a wormhole switch block.
//
// Words arriving on the channel enter an eight-word input buffer. When the
// word at the head of the buffer is a packet header and the port holds no
// output, the routing decision function of the switch kind (TBWP up-routing,
// down-routing, or TB for a mega-switch) lists the candidate outputs; the
// port picks one free candidate with its own rotating priority and requests
// it (req, one-hot). When the switch grants it (gnt), the output stays
// reserved for this packet until its last word has passed: words then move
// one per clock into the output buffer whenever that buffer has space
// (out_space). The header word may move in the cycle of the grant.
// The end of a packet is found by counting words against the length field
// of the header, as the evaluated channel model did with its pulse counters.
// Timing: a word written on clock edge n can leave on edge n+1 at the
// earliest. Buffer depth follows the evaluated model; the request/grant
// interface and the counter are this design's own.
module xgft_input_port
  import xgft_pkg::*;
#(
  parameter sw_kind_e KIND       = SW_DOWN,
  parameter int       STAGE      = 1,
  parameter int       N_OUT      = 4,
  parameter int       N_TBC      = N_TBC_DEFAULT,
  parameter bit       FROM_CHILD = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // channel from the previous switch or leaf
  input  link_t            in,
  output logic             in_ready,
  // allocation
  input  logic [N_OUT-1:0] out_free,
  output logic [N_OUT-1:0] req,
  input  logic             gnt,
  // transfer through the crossbar
  input  logic [N_OUT-1:0] out_space,
  output logic             xfer_valid,
  output logic [N_OUT-1:0] xfer_sel,
  output word_t            xfer_data,
  output logic             xfer_last
);
  word_t            head;
  logic             empty, full, pop;
  logic [$clog2(BUF_DEPTH+1)-1:0] unused_count;

  xgft_fifo #(.WIDTH(DATA_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .push (in.valid), .wdata(in.data),
    .pop, .rdata(head), .empty, .full, .count(unused_count)
  );
  assign in_ready = !full;

  logic             busy;      // an output is reserved for the current packet
  logic             in_pkt;    // the header of the current packet has left
  logic [N_OUT-1:0] sel;       // the reserved output
  len_t             remaining; // words of the current packet still to leave

  // ---------------- routing decision ----------------
  logic [N_OUT-1:0] cand;
  logic             evt_common, evt_bypass;  // observed by testbenches

  generate
    if (KIND == SW_UP) begin : g_up
      xgft_rdf_tbwp_up #(.STAGE(STAGE), .N_TBC(N_TBC)) u_rdf (
        .hdr(head), .out_free, .cand, .common(evt_common), .bypass(evt_bypass)
      );
    end else if (KIND == SW_DOWN) begin : g_down
      xgft_rdf_down #(.STAGE(STAGE)) u_rdf (.hdr(head), .cand);
      assign evt_common = 1'b0;
      assign evt_bypass = 1'b0;
    end else begin : g_mega
      xgft_rdf_tb #(.STAGE(STAGE), .FROM_CHILD(FROM_CHILD)) u_rdf (
        .hdr(head), .out_free, .cand, .turn(evt_common)
      );
      assign evt_bypass = 1'b0;
    end
  endgenerate

  wire hdr_wait = !busy && !empty;
  logic [N_OUT-1:0] pick;

  xgft_rr_arbiter #(.N(N_OUT)) u_pick (
    .clk, .rst_n,
    .req    (hdr_wait ? (cand & out_free) : '0),
    .advance(gnt),
    .grant  (pick)
  );
  assign req = pick;

  // ---------------- transfer ----------------
  len_t hlen_raw, hlen;
  logic [N_OUT-1:0] cur_sel;
  assign hlen_raw = head[2*ENC_W +: LEN_W];

  always_comb begin
    hlen       = (hlen_raw == '0) ? len_t'(1) : hlen_raw;
    cur_sel    = busy ? sel : (gnt ? pick : '0);
    xfer_valid = !empty && |(cur_sel & out_space);
    xfer_sel   = cur_sel;
    xfer_data  = head;
    xfer_last  = in_pkt ? (remaining == len_t'(1)) : (hlen == len_t'(1));
    pop        = xfer_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      in_pkt    <= 1'b0;
      sel       <= '0;
      remaining <= '0;
    end else begin
      if (gnt) begin
        busy <= 1'b1;
        sel  <= pick;
      end
      if (xfer_valid) begin
        remaining <= in_pkt ? remaining - 1'b1 : hlen - 1'b1;
        in_pkt    <= !xfer_last;
        if (xfer_last) busy <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(gnt && busy)) else $error("xgft_input_port: grant while holding an output");
      assert ($onehot0(req)) else $error("xgft_input_port: request not one-hot");
    end
  end
endmodule
