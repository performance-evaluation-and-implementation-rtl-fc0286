// tb_xgft_addr_rom: every leaf address of XGFT(3;4,3,5;2,2,2) against the
// division formula d_L = (D div N_{L-1}) mod m_L computed here, the worked
// examples 11 -> (0,2,3), 27 -> (2,0,3), 35 -> (2,2,3), and the out-of-range
// addresses.
module tb_xgft_addr_rom;
  import xgft_pkg::*;
  logic [ADDR_W-1:0] addr;
  enc_t enc;
  logic valid;
  int checks = 0, failures = 0;

  xgft_addr_rom dut (.*);

  function automatic enc_t ref_enc(input int D);
    int d1, d2, d3;
    d1 = D % 4;
    d2 = (D / 4) % 3;
    d3 = (D / 12) % 5;
    return enc_t'({3'(d3), 2'(d2), 2'(d1)});
  endfunction

  task automatic expect_enc(input int D, input enc_t e);
    addr = ADDR_W'(D);
    #1;
    checks++;
    if (!valid || enc != e) begin
      failures++;
      $display("FAIL: addr %0d enc %b expected %b", D, enc, e);
    end
  endtask

  initial begin
    for (int D = 0; D < 60; D++) expect_enc(D, ref_enc(D));
    expect_enc(11, 7'b000_10_11);
    expect_enc(27, 7'b010_00_11);
    expect_enc(35, 7'b010_10_11);
    for (int D = 60; D < 64; D++) begin
      addr = ADDR_W'(D);
      #1;
      checks++;
      if (valid) begin failures++; $display("FAIL: addr %0d marked valid", D); end
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
