// tb_xgft_output_port: a stream of words pushed whenever space is high into
// an output port drained with random ready. Checks word order, that space
// drops after eight unread words, that a pushed word is offered one clock
// later, and that an offered word stays until taken.
module tb_xgft_output_port;
  import xgft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, space, out_ready;
  word_t wdata;
  link_t out;
  int checks = 0, failures = 0;
  word_t model[$];

  xgft_output_port dut (.*);

  initial begin
    push = 0; wdata = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // latency: one word into an empty port is offered after one clock
    push = 1; wdata = 32'hcafe0001;
    @(posedge clk); #1;
    push = 0;
    checks++;
    if (!out.valid || out.data != 32'hcafe0001) begin failures++; $display("FAIL: latency"); end
    out_ready = 1;
    @(posedge clk); #1;
    out_ready = 0;
    // fill: eight words without reading
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!space) begin failures++; $display("FAIL: no space at %0d", i); end
      push = 1; wdata = 32'h100 + i;
      @(posedge clk); #1;
    end
    push = 0;
    checks++;
    if (space) begin failures++; $display("FAIL: space while holding eight words"); end
    for (int i = 0; i < 8; i++) model.push_back(32'h100 + i);
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      word_t held;
      push  = space && ($urandom % 2);
      wdata = $urandom;
      out_ready = ($urandom % 3) != 0;
      held = out.data;
      #1;
      checks++;
      if (out.valid != (model.size() != 0) || (out.valid && out.data != model[0])) begin
        failures++;
        $display("FAIL c%0d: valid %b data %h expected %h", c, out.valid, out.data, model[0]);
      end
      @(posedge clk);
      if (out.valid && out_ready) void'(model.pop_front());
      if (push) model.push_back(wdata);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
