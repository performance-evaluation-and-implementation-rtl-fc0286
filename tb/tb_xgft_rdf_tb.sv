// tb_xgft_rdf_tb: TB routing decision of mega-switches in stages 1..3, for
// headers from child and from parent ports, all 3600 source/destination
// pairs, random free outputs. Reference: turn down through C_DR[d_L] when
// S div N_L = D div N_L (or in the root stage, or when coming from a
// parent); otherwise the free P_UR ports.
module tb_xgft_rdf_tb;
  import xgft_pkg::*;
  word_t hdr;
  logic [5:0] f1, f2, cc1, cc2, cp1, cp2;
  logic [4:0] f3, cc3;
  logic t1, t2, t3, tp1, tp2;
  int checks = 0, failures = 0;

  xgft_rdf_tb #(.STAGE(1), .FROM_CHILD(1)) u1  (.hdr, .out_free(f1), .cand(cc1), .turn(t1));
  xgft_rdf_tb #(.STAGE(2), .FROM_CHILD(1)) u2  (.hdr, .out_free(f2), .cand(cc2), .turn(t2));
  xgft_rdf_tb #(.STAGE(3), .FROM_CHILD(1)) u3  (.hdr, .out_free(f3), .cand(cc3), .turn(t3));
  xgft_rdf_tb #(.STAGE(1), .FROM_CHILD(0)) up1 (.hdr, .out_free(f1), .cand(cp1), .turn(tp1));
  xgft_rdf_tb #(.STAGE(2), .FROM_CHILD(0)) up2 (.hdr, .out_free(f2), .cand(cp2), .turn(tp2));

  initial begin
    for (int S = 0; S < 60; S++)
      for (int D = 0; D < 60; D++) begin
        logic [5:0] e1, e2, d1, d2;
        logic [4:0] e3;
        bit k1, k2;
        hdr = '0;
        hdr[6:0]  = {3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)};
        hdr[13:7] = {3'((S / 12) % 5), 2'((S / 4) % 3), 2'(S % 4)};
        f1 = 6'($urandom); f2 = 6'($urandom); f3 = 5'($urandom);
        #1;
        k1 = (S / 4) == (D / 4);
        k2 = (S / 12) == (D / 12);
        d1 = 6'(1 << (D % 4));
        d2 = 6'(1 << ((D / 4) % 3));
        e1 = k1 ? d1 : (f1 & 6'b110000);
        e2 = k2 ? d2 : (f2 & 6'b011000);
        e3 = 5'(1 << ((D / 12) % 5));
        checks++;
        if (cc1 != e1 || cc2 != e2 || cc3 != e3 || t1 != k1 || t2 != k2 || !t3 ||
            cp1 != d1 || cp2 != d2 || tp1 || tp2) begin
          failures++;
          $display("FAIL S%0d D%0d: %b %b %b / %b %b", S, D, cc1, cc2, cc3, cp1, cp2);
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
