// fwft_fifo: first-word-fall-through FIFO.
//
// The oldest entry is always visible on dout while empty is low; pop removes
// it. It is a register array with read and write pointers and an occupancy
// count, so push and pop may happen in the same cycle. Pushing when full and
// popping when empty are ignored. flush empties the FIFO in one cycle.
//
// The AEAD wrapper uses it twice: as the 4 x 24 bypass FIFO between the
// pre- and post-processor (the size the CAESAR hardware API gives it), and as
// the auxiliary FIFO that holds decrypted words until the tag has been
// checked (32 x 64, a size chosen here).
module fwft_fifo #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic do_push, do_pop;
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

endmodule
