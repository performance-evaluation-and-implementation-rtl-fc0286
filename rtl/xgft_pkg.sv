// xgft_pkg: topology, word format and address encoding shared by every block
// of the XGFT network.
//
// The network is XGFT(h; m_1..m_h; w_1..w_h): switches in stage L have m_L
// child ports and w_L parent ports. The default is XGFT(3; 4,3,5; 2,2,2),
// the 60-leaf network used in the evaluation (4 root switches, 10 switches in
// stage 2, 15 in stage 1).
//
// Leaf addresses are carried in packet headers in encoded form: the encoded
// address of leaf D is the concatenation d_h..d_1 of the down-routing port
// numbers d_L = (D div (m_1*..*m_{L-1})) mod m_L, each field k_L = clog2(m_L)
// bits wide. With that encoding every routing decision is a compare of
// high-order fields or a cut of one field; no division is needed in a switch.
//
// Word format (one word moves per clock per channel). The first word of a
// packet is its header:
//   [ENC_W-1:0]              destination (encoded in the network)
//   [2*ENC_W-1:ENC_W]        source (encoded in the network)
//   [2*ENC_W+LEN_W-1:2*ENC_W] packet length in words, header included
// The word width (32) and the field layout are this design's choice; the
// source, destination and length fields themselves follow the evaluated
// packet format.
package xgft_pkg;

  // ---------------- topology ----------------
  localparam int H = 3;
  localparam int M [1:H] = '{4, 3, 5};
  localparam int W [1:H] = '{2, 2, 2};

  // Number of turn-back channels between the halves of a dual-switch node.
  localparam int N_TBC_DEFAULT = 1;

  // Depth of the input and output buffers, in words.
  localparam int BUF_DEPTH = 8;

  // Width of field d_L of an encoded address.
  function automatic int k_of(input int L);
    return (M[L] <= 1) ? 0 : $clog2(M[L]);
  endfunction

  // Bit offset of field d_L in an encoded address (d_1 is least significant).
  function automatic int off_of(input int L);
    int s;
    s = 0;
    for (int i = 1; i < L; i++) s += k_of(i);
    return s;
  endfunction

  // Leaves in a sub-XGFT of height L (N_L = m_1*..*m_L, N_0 = 1).
  function automatic int leaves_below(input int L);
    int p;
    p = 1;
    for (int i = 1; i <= L; i++) p *= M[i];
    return p;
  endfunction

  // Root switches of a sub-XGFT of height L: w_1*..*w_{L-1}.
  function automatic int roots_of(input int L);
    int p;
    p = 1;
    for (int i = 1; i < L; i++) p *= W[i];
    return p;
  endfunction

  // Number of sub-XGFTs of height L in the whole network: m_{L+1}*..*m_h.
  function automatic int subs_of(input int L);
    int p;
    p = 1;
    for (int i = L + 1; i <= H; i++) p *= M[i];
    return p;
  endfunction

  // Switches in stage L.
  function automatic int nsw_of(input int L);
    return subs_of(L) * roots_of(L);
  endfunction

  // Channels (in one direction) between stage L and stage L+1; for L = h the
  // parent ports of the root switches.
  function automatic int nch_of(input int L);
    return nsw_of(L) * W[L];
  endfunction

  // Index of the first channel of stage L in a flat channel array.
  function automatic int choff_of(input int L);
    int s;
    s = 0;
    for (int i = 1; i < L; i++) s += nch_of(i);
    return s;
  endfunction

  localparam int NLEAF   = leaves_below(H);
  localparam int ADDR_W  = $clog2(NLEAF);
  localparam int ENC_W   = off_of(H + 1);
  localparam int LEN_W   = 6;
  localparam int DATA_W  = 32;
  localparam int NCH_ALL = choff_of(H + 1);

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ENC_W-1:0]  enc_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Forward half of a channel; the ready signal runs the other way.
  typedef struct packed {
    logic  valid;
    word_t data;
  } link_t;

  typedef enum logic [1:0] {
    SW_UP   = 2'd0,   // up-routing half of a dual-switch node (TBWP part 1)
    SW_DOWN = 2'd1,   // down-routing half of a dual-switch node (part 2)
    SW_MEGA = 2'd2    // mega-switch node (TB)
  } sw_kind_e;

  typedef enum logic {
    NODE_DUAL = 1'b0,
    NODE_MEGA = 1'b1
  } node_kind_e;

  // Encoded form of leaf address D.
  function automatic enc_t encode_addr(input int D);
    enc_t e;
    int   d;
    e = '0;
    for (int L = 1; L <= H; L++) begin
      d = (D / leaves_below(L - 1)) % M[L];
      for (int b = 0; b < k_of(L); b++)
        e[off_of(L) + b] = 1'((d >> b) & 1);
    end
    return e;
  endfunction

  // Field d_L of an encoded address.
  function automatic int field_of(input enc_t e, input int L);
    enc_t f;
    f = (e >> off_of(L)) & enc_t'((1 << k_of(L)) - 1);
    return int'(f);
  endfunction

  // Mask of the fields d_h..d_{L+1}; zero for L = h.
  function automatic enc_t prefix_mask(input int L);
    enc_t m;
    m = '0;
    for (int b = off_of(L + 1); b < ENC_W; b++) m[b] = 1'b1;
    return m;
  endfunction

  function automatic enc_t hdr_dst(input word_t w);
    return w[ENC_W-1:0];
  endfunction

  function automatic enc_t hdr_src(input word_t w);
    return w[2*ENC_W-1:ENC_W];
  endfunction

  function automatic len_t hdr_len(input word_t w);
    return w[2*ENC_W+LEN_W-1:2*ENC_W];
  endfunction

  function automatic word_t make_hdr(input enc_t dst, input enc_t src, input len_t len);
    word_t w;
    w = '0;
    w[ENC_W-1:0]               = dst;
    w[2*ENC_W-1:ENC_W]         = src;
    w[2*ENC_W+LEN_W-1:2*ENC_W] = len;
    return w;
  endfunction

endpackage
