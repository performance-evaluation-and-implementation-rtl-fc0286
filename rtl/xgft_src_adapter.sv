// xgft_src_adapter: address translation at the packet source of leaf SRC.
//
// A leaf writes the header of a packet with the plain destination leaf number
// in bits [ADDR_W-1:0] and the length in the length field. On its way into
// the network the adapter replaces the destination with its encoded form from
// the address ROM and writes the encoded address of SRC into the source
// field; the length and the upper header bits pass unchanged. Other words
// pass unchanged. Headers are recognised by counting the words of each
// packet against its length field. The path is combinational (no added
// latency): valid and data go forward, ready comes back unchanged.
// Placing encoded-address ROMs at the sources follows the described design;
// the plain-address header layout is this design's own.
module xgft_src_adapter
  import xgft_pkg::*;
#(
  parameter int SRC = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in,         // from the leaf, plain addresses
  output logic  in_ready,
  output link_t out,        // to the network, encoded addresses
  input  logic  out_ready
);
  localparam enc_t SRC_ENC = encode_addr(SRC);

  logic in_pkt;
  len_t remaining;
  len_t hlen, hlen_raw;
  assign hlen_raw = in.data[2*ENC_W +: LEN_W];
  enc_t dst_enc;
  logic dst_ok;

  xgft_addr_rom u_rom (.addr(in.data[ADDR_W-1:0]), .enc(dst_enc), .valid(dst_ok));

  always_comb begin
    hlen      = (hlen_raw == '0) ? len_t'(1) : hlen_raw;
    in_ready  = out_ready;
    out.valid = in.valid;
    out.data  = in.data;
    if (!in_pkt) begin
      out.data[2*ENC_W-1:0] = {SRC_ENC, dst_enc};
    end
  end

  wire take = in.valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      remaining <= '0;
    end else if (take) begin
      if (!in_pkt) begin
        in_pkt    <= (hlen != len_t'(1));
        remaining <= hlen - 1'b1;
      end else begin
        in_pkt    <= (remaining != len_t'(1));
        remaining <= remaining - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && take && !in_pkt)
      assert (dst_ok) else $error("xgft_src_adapter: destination %0d out of range", in.data[ADDR_W-1:0]);
  end
endmodule
