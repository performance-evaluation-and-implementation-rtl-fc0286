// xgft_output_port: output port block (OP) of a switch block.
//
// An eight-word output buffer between the crossbar and the outgoing channel.
// The crossbar writes a word with push when space is high; the channel sees
// the head word with valid high while the buffer holds a word and takes it
// on a clock edge with ready high (valid/ready handshake: valid stays high
// and data stays unchanged until the word is taken). One word per clock in
// each direction. The buffer depth follows the evaluated model.
module xgft_output_port
  import xgft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  word_t wdata,
  output logic  space,
  output link_t out,
  input  logic  out_ready
);
  logic empty, full;
  word_t head;
  logic [$clog2(BUF_DEPTH+1)-1:0] unused_count;

  xgft_fifo #(.WIDTH(DATA_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .push, .wdata,
    .pop(out_ready && !empty), .rdata(head), .empty, .full, .count(unused_count)
  );

  assign space     = !full;
  assign out.valid = !empty;
  assign out.data  = head;

  // A word offered on the channel is held until it is taken.
  logic  held_valid;
  word_t held_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held_valid <= 1'b0;
    else        held_valid <= out.valid && !out_ready;
  end
  always_ff @(posedge clk) held_data <= out.data;
  always_ff @(posedge clk) begin
    if (rst_n && held_valid)
      assert (out.valid && out.data == held_data) else $error("xgft_output_port: word withdrawn");
  end
endmodule
