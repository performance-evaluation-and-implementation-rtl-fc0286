// tb_xgft_rr_arbiter: rotating priority of a 5-way arbiter against a model
// that remembers the last accepted requester; also checks that the pointer
// holds when advance is low and that all requesters are served in turn.
module tb_xgft_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, grant, exp_g;
  logic advance;
  int checks = 0, failures = 0;
  int last = N - 1;

  xgft_rr_arbiter #(.N(N)) dut (.*);

  initial begin
    req = 0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int c = 0; c < 2000; c++) begin
      req = (c < 100) ? '1 : N'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      exp_g = '0;
      for (int s = 1; s <= N; s++)
        if (exp_g == 0 && req[(last + s) % N]) exp_g[(last + s) % N] = 1'b1;
      checks++;
      if (grant !== exp_g) begin
        failures++;
        $display("FAIL c%0d: req %b grant %b expected %b", c, req, grant, exp_g);
      end
      @(posedge clk);
      if (advance && req != 0)
        for (int i = 0; i < N; i++) if (exp_g[i]) last = i;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
