// tb_xgft_input_port: a down-routing input port of stage 1 (four outputs).
// The testbench plays the switch: it grants a pending request after a random
// delay and drives random output space. Checks that the request is C_DR[d_1]
// of the header, that no request is made while an output is held, that words
// leave in order only to the granted output and only with space, that the
// header may leave in the cycle of its grant, and that the last word of each
// packet (by its length field) is flagged.
module tb_xgft_input_port;
  import xgft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t in;
  logic in_ready, gnt, xfer_valid, xfer_last;
  logic [3:0] out_free, req, out_space, xfer_sel;
  word_t xfer_data;
  int checks = 0, failures = 0;
  int same_cycle = 0;

  xgft_input_port #(.KIND(SW_DOWN), .STAGE(1), .N_OUT(4)) dut (.*);

  // expected stream
  word_t exp_w[$];
  bit    exp_last[$];
  int    exp_port[$];

  // sender
  initial begin
    in = '0;
    wait (rst_n);
    @(posedge clk); #1;
    for (int p = 0; p < 200; p++) begin
      int len, d;
      len = 1 + ($urandom % 20);
      d   = $urandom % 60;
      for (int i = 0; i < len; i++) begin
        word_t w;
        w = (i == 0) ? make_hdr(enc_t'({3'((d / 12) % 5), 2'((d / 4) % 3), 2'(d % 4)}), '0, len_t'(len))
                     : word_t'($urandom);
        exp_w.push_back(w);
        exp_last.push_back(i == len - 1);
        exp_port.push_back(d % 4);
        in.valid = 1'b1;
        in.data  = w;
        while (!in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        in.valid = 1'b0;
        if ($urandom % 3 == 0) begin @(posedge clk); #1; end
      end
    end
    in.valid = 1'b0;
  end

  // switch model
  logic holding = 0;
  logic [3:0] held;
  int words = 0;
  initial begin
    gnt = 0; out_free = '1; out_space = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    forever begin
      #1;
      out_space = 4'($urandom) | 4'($urandom);
      gnt = 1'b0;
      #1;
      if (!holding && req != 0 && ($urandom % 2)) gnt = 1'b1;
      #1;
      if (req != 0) begin
        checks++;
        if (holding || exp_w.size() == 0 || req != 4'(1 << exp_port[0]) || !$onehot(req)) begin
          failures++;
          $display("FAIL: request %b", req);
        end
      end
      if (xfer_valid) begin
        checks++;
        if (exp_w.size() == 0 || xfer_data != exp_w[0] || xfer_last != exp_last[0] ||
            xfer_sel != 4'(1 << exp_port[0]) || !(holding || gnt) || (out_space & xfer_sel) == 0) begin
          failures++;
          $display("FAIL: transfer %h last %b sel %b", xfer_data, xfer_last, xfer_sel);
        end
        if (gnt) same_cycle++;
      end
      @(posedge clk);
      if (gnt) begin holding = 1; held = req; end
      if (xfer_valid) begin
        words++;
        if (exp_last[0]) holding = 0;
        void'(exp_w.pop_front()); void'(exp_last.pop_front()); void'(exp_port.pop_front());
      end
      if (exp_w.size() == 0 && words > 100 && !in.valid) begin
        checks++;
        if (same_cycle == 0) begin failures++; $display("FAIL: header never left with its grant"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d words, pending %0d holding %b req %b busy %b empty %b in_pkt %b rem %0d head %h cand %b pick %b rdfhdr %h rdfcand %b", words, exp_w.size(), holding, req, dut.busy, dut.empty, dut.in_pkt, dut.remaining, dut.head, dut.cand, dut.pick, dut.g_down.u_rdf.hdr, dut.g_down.u_rdf.cand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
