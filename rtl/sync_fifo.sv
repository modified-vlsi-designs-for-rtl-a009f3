// sync_fifo: single-clock first-in-first-out buffer.
//
// Used for the front buffers (received symbols waiting for a decoder unit) and
// the rear buffers (decoded bits waiting for the block multiplexer) of the
// parallel decoder. A circular array with read and write pointers and an
// occupancy count. The head entry is visible on dout while empty is low
// (first-word fall-through); pop removes it. push is ignored when full and pop
// when empty. room_ok is high while at least ROOM entries are free, which lets
// a pipelined producer stop early enough to never overflow.
//
// The design only names these buffers as FIFOs; depth, fall-through read and
// the room flag are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 4,
  parameter int DEPTH = 16,
  parameter int ROOM  = 1,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             room_ok
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [AW:0]      cnt_q;
  logic             do_push, do_pop;

  assign empty   = (cnt_q == '0);
  assign full    = (cnt_q == (AW+1)'(DEPTH));
  assign room_ok = (cnt_q + (AW+1)'(ROOM) <= (AW+1)'(DEPTH));
  assign dout    = mem[rd_q];
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] v);
    return (v == AW'(DEPTH - 1)) ? '0 : v + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= nxt(wr_q);
      if (do_pop)  rd_q <= nxt(rd_q);
      if (do_push && !do_pop)      cnt_q <= cnt_q + 1'b1;
      else if (do_pop && !do_push) cnt_q <= cnt_q - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din;
  end

endmodule
