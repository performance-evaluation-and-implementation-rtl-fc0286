// tb_xgft_fifo: random push/pop against a queue model of an 8-word buffer.
// Checks head word, empty, full and count every clock, including pushes
// offered while full (they must be ignored).
module tb_xgft_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [31:0] wdata, rdata;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  xgft_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int c = 0; c < 3000; c++) begin
      // bias toward filling in the first half, draining in the second
      push  = ($urandom % 100) < (c < 1500 ? 70 : 30);
      pop   = !empty && (($urandom % 100) < (c < 1500 ? 30 : 70));
      wdata = $urandom;
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          int'(count) != model.size() || (model.size() > 0 && rdata != model[0])) begin
        failures++;
        $display("FAIL cycle %0d: count %0d model %0d", c, count, model.size());
      end
      @(posedge clk);
      begin
        bit acc;
        acc = push && model.size() < DEPTH;
        if (pop && model.size() > 0) void'(model.pop_front());
        if (acc) model.push_back(wdata);
      end
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
