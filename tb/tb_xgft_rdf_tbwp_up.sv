// tb_xgft_rdf_tbwp_up: TBWP up-routing decision in stages 1, 2 and 3 for all
// 3600 source/destination pairs with random free/reserved outputs. The
// reference is the original, unencoded algorithm: a node in stage L is a
// common ancestor when S div N_L = D div N_L (N_1 = 4, N_2 = 12, N_3 = 60).
// Outputs are P_UR[0], P_UR[1], turn-back channel.
module tb_xgft_rdf_tbwp_up;
  import xgft_pkg::*;
  word_t hdr;
  logic [2:0] free [1:3];
  logic [2:0] cand [1:3];
  logic common [1:3], bypass [1:3];
  int checks = 0, failures = 0;

  for (genvar L = 1; L <= 3; L++) begin : g_st
    xgft_rdf_tbwp_up #(.STAGE(L), .N_TBC(1)) dut (
      .hdr, .out_free(free[L]), .cand(cand[L]), .common(common[L]), .bypass(bypass[L])
    );
  end

  function automatic enc_t ref_enc(input int D);
    return enc_t'({3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)});
  endfunction

  initial begin
    int nl [1:3] = '{4, 12, 60};
    for (int S = 0; S < 60; S++)
      for (int D = 0; D < 60; D++) begin
        hdr = '0;
        hdr[6:0]  = ref_enc(D);
        hdr[13:7] = ref_enc(S);
        hdr[19:14] = 6'd20;
        for (int L = 1; L <= 3; L++) free[L] = 3'($urandom);
        #1;
        for (int L = 1; L <= 3; L++) begin
          bit c;
          logic [2:0] e;
          c = (S / nl[L]) == (D / nl[L]);
          if (c && free[L][2]) e = (L == 3) ? free[L] : (free[L] & 3'b100);
          else                 e = free[L] & 3'b011;
          checks++;
          if (cand[L] != e || common[L] != c || bypass[L] != (c && !free[L][2] && L != 3)) begin
            failures++;
            $display("FAIL L%0d S%0d D%0d free %b: cand %b expected %b", L, S, D, free[L], cand[L], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
