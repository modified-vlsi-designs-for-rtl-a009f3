// smu_lifo: last-in-first-out buffer that reverses blocks of H entries.
//
// The trace-back decoder produces each block of H decoded bits newest first;
// this buffer hands them out oldest first. It is a single H-entry memory used
// with read-before-write: on every step the entry at the current address is
// read out (it belongs to the previous block) and the new value is written in
// its place. The address runs up through a block and down through the next,
// so each block is read in the reverse of the order it was written. One block
// of storage therefore suffices for a continuous stream.
//
// Interface:
//   step   advance one entry this cycle (writes din, dout is the entry read)
//   idx    position 0..H-1 of this step within the current block; the address
//          direction flips after the step with idx == H-1
//   dout   combinational: the entry at the current address before the write,
//          i.e. the previous block's values in reversed order
//
// The need for a LIFO after the decode-read process comes from the trace-back
// scheme; the alternating-direction single-memory form is this design's choice.
module smu_lifo #(
  parameter int H = 21,
  parameter int W = 1,
  localparam int AW = (H > 1) ? $clog2(H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic [AW-1:0] idx,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0]  mem [H];
  logic          up_q;      // 1: address = idx, 0: address = H-1-idx
  logic [AW-1:0] addr;

  assign addr = up_q ? idx : AW'(H - 1) - idx;
  assign dout = mem[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_q <= 1'b1;
    end else if (step) begin
      if (idx == AW'(H - 1)) up_q <= ~up_q;
    end
  end

  always_ff @(posedge clk) begin
    if (step) mem[addr] <= din;
  end

endmodule
