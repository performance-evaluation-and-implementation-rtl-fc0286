// tb_xgft_src_adapter: the adapter of leaf 27 gets packets of random length
// (1..32 words, also a zero length meaning one word) with plain destination
// numbers, random gaps and random back-pressure. Checks that headers leave
// with the encoded destination and source (27 -> (2,0,3)) and unchanged
// length and upper bits, that other words and the handshake pass unchanged,
// and that the path adds no latency.
module tb_xgft_src_adapter;
  import xgft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t in, out;
  logic in_ready, out_ready;
  int checks = 0, failures = 0;

  xgft_src_adapter #(.SRC(27)) dut (.*);

  function automatic enc_t ref_enc(input int D);
    return enc_t'({3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)});
  endfunction

  initial begin
    in = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < 300; p++) begin
      int d, len, n;
      d   = $urandom % 60;
      len = (p % 17 == 0) ? 0 : 1 + ($urandom % 32);
      n   = (len == 0) ? 1 : len;
      for (int i = 0; i < n; i++) begin
        word_t w;
        w = word_t'($urandom);
        if (i == 0) begin
          w[5:0] = 6'(d);
          w[13:6] = 8'($urandom);
          w[19:14] = 6'(len);
        end
        in.valid = 1'b1;
        in.data  = w;
        do begin
          out_ready = ($urandom % 3) != 0;
          #1;
          checks++;
          if (in_ready != out_ready || !out.valid) begin
            failures++;
            $display("FAIL: handshake");
          end
          if (i == 0) begin
            if (out.data[6:0] != ref_enc(d) || out.data[13:7] != 7'h23 ||
                out.data[31:14] != w[31:14]) begin
              failures++;
              $display("FAIL: header %h for dst %0d", out.data, d);
            end
          end else if (out.data != w) begin
            failures++;
            $display("FAIL: payload word %0d changed", i);
          end
          @(posedge clk);
          #1;
        end while (!out_ready);
        if ($urandom % 4 == 0) begin
          in.valid = 1'b0;
          in.data  = word_t'($urandom);   // headers must not be taken from idle words
          @(posedge clk);
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
