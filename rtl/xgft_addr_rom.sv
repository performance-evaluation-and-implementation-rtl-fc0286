// xgft_addr_rom: read-only table of encoded leaf addresses.
//
// Entry D holds the encoded form d_h..d_1 of leaf address D, with
// d_L = (D div (m_1*..*m_{L-1})) mod m_L in a clog2(m_L)-bit field. The
// table is computed at elaboration from the topology in xgft_pkg, so the
// divisions never reach hardware: a source looks up the encoded address in
// one combinational read. Addresses of NLEAF or more give valid low and a
// zero code.
module xgft_addr_rom
  import xgft_pkg::*;
(
  input  logic [ADDR_W-1:0] addr,
  output enc_t              enc,
  output logic              valid
);
  function automatic enc_t [NLEAF-1:0] build_table();
    enc_t [NLEAF-1:0] t;
    for (int d = 0; d < NLEAF; d++) t[d] = encode_addr(d);
    return t;
  endfunction

  localparam enc_t [NLEAF-1:0] TABLE = build_table();

  always_comb begin
    valid = (int'(addr) < NLEAF);
    enc   = valid ? TABLE[addr] : '0;
  end
endmodule
