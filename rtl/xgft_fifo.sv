// xgft_fifo: word buffer used as the input and output buffer of every switch
// port.
//
// A circular buffer of DEPTH words with read and write pointers and an
// occupancy counter. The head word is visible on rdata while empty is low and
// leaves the buffer on a clock edge with pop high; push writes wdata on the
// same edge. A push while full is ignored, so a producer may hold push high
// with its word until full drops (push = valid, full = not ready); push and
// pop may happen in the same cycle. The depth of eight words follows the
// evaluated switch model; the pointer implementation is this design's own.
module xgft_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rdata = mem[rp];

  wire do_pop  = pop && !empty;
  wire do_push = push && !full;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= nxt(wp);
      if (do_pop)  rp <= nxt(rp);
      count <= count + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  // Reading an empty buffer is a protocol error of the surrounding logic.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(pop && empty)) else $error("xgft_fifo: pop while empty");
  end
endmodule
