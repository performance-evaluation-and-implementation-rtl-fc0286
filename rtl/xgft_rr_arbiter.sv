// xgft_rr_arbiter: rotating-priority (round-robin) arbiter.
//
// grant is one-hot among the set bits of req, or zero when req is zero. The
// request just after the last accepted one has the highest priority, so every
// requester is served within N turns. The priority pointer moves only on a
// clock edge with advance high and a grant given, which lets a caller
// discard a grant that was not used. Rotating priority is what the evaluated
// switch model used for choosing input and output ports; the pointer form is
// this design's own.
module xgft_rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // index of the last accepted requester
  logic [IW-1:0] win;

  always_comb begin
    grant = '0;
    win   = last;
    // Search N positions starting after 'last'; the first hit wins.
    for (int s = N; s >= 1; s--) begin
      if (req[(int'(last) + s) % N]) begin
        grant = '0;
        grant[(int'(last) + s) % N] = 1'b1;
        win = IW'((int'(last) + s) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 last <= IW'(N - 1);
    else if (advance && |req)   last <= win;
  end

  always_comb begin
    assert ($onehot0(grant));
  end
endmodule
