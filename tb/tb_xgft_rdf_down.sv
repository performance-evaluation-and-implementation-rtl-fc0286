// tb_xgft_rdf_down: down-routing port selection in stages 1, 2 and 3 for all
// 60 destinations against d_L = (D div N_{L-1}) mod m_L (N_0 = 1, N_1 = 4,
// N_2 = 12). Includes the worked example: leaf 35 leaves stage 3 by C_DR[2],
// stage 2 by C_DR[2] and stage 1 by C_DR[3].
module tb_xgft_rdf_down;
  import xgft_pkg::*;
  word_t hdr;
  logic [3:0] c1;
  logic [2:0] c2;
  logic [4:0] c3;
  int checks = 0, failures = 0;

  xgft_rdf_down #(.STAGE(1)) u1 (.hdr, .cand(c1));
  xgft_rdf_down #(.STAGE(2)) u2 (.hdr, .cand(c2));
  xgft_rdf_down #(.STAGE(3)) u3 (.hdr, .cand(c3));

  initial begin
    for (int D = 0; D < 60; D++) begin
      hdr = word_t'($urandom) & ~word_t'(7'h7f);
      hdr[6:0] = {3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)};
      #1;
      checks++;
      if (c1 != 4'(1 << (D % 4)) || c2 != 3'(1 << ((D / 4) % 3)) || c3 != 5'(1 << ((D / 12) % 5))) begin
        failures++;
        $display("FAIL D%0d: %b %b %b", D, c3, c2, c1);
      end
      if (D == 35) begin
        checks++;
        if (c3 != 5'b00100 || c2 != 3'b100 || c1 != 4'b1000) begin
          failures++;
          $display("FAIL worked example 35");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
