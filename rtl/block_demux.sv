// block_demux: splits a continuous symbol stream into overlapping blocks for
// the two decoder units of the parallel Viterbi decoder.
//
// The stream is cut into data blocks of N symbols; block i goes to unit i mod 2.
// To be decoded on its own, block i also needs the L symbols before it
// (warm-up stage) and the D symbols after it (tail stage). With N >= L + D a
// symbol is then needed by at most two blocks, which sit in different units, so
// each symbol is written to its own block's unit and, when it lies in the first
// D symbols or the last L symbols of the block, also to the other unit. The
// first block of the stream has no warm-up stage and is flagged first.
//
// Interface: valid/ready symbol input; two write ports (push, data) towards
// the front FIFOs, data = {first, sob, sym}; full inputs from those FIFOs. A
// symbol is accepted only when every FIFO it goes to has room, so the two units
// see identical copies of the shared symbols. One symbol per cycle.
//
// The block/warm-up/tail layout is the design's; the two-write overlap rule
// and the flags are this design's way of realising it.
module block_demux #(
  parameter int N = 256,
  parameter int L = 42,
  parameter int D = 42,
  localparam int PW = $clog2(N)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_sym,
  output logic [1:0] push,
  output logic [3:0] data [2],
  input  logic [1:0] full
);

  initial assert (N >= L + D) else $error("block_demux needs N >= L + D");

  logic [PW-1:0] pos_q;       // position within the current data block
  logic          par_q;       // unit of the current data block
  logic          first_q;     // current data block is the first one
  logic          to_other, sob_own, sob_other;

  always_comb begin
    to_other  = (L > 0 && int'(pos_q) >= N - L) || (int'(pos_q) < D && !first_q);
    sob_own   = (pos_q == '0) && (first_q || L == 0);
    sob_other = (L > 0) && (int'(pos_q) == N - L);
    in_ready  = !full[par_q] && !(to_other && full[!par_q]);
    push      = '0;
    data[0]   = '0;
    data[1]   = '0;
    data[par_q]  = {first_q, sob_own, in_sym};
    data[!par_q] = {1'b0, sob_other, in_sym};
    if (in_valid && in_ready) begin
      push[par_q]  = 1'b1;
      push[!par_q] = to_other;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q   <= '0;
      par_q   <= 1'b0;
      first_q <= 1'b1;
    end else if (in_valid && in_ready) begin
      if (int'(pos_q) == N - 1) begin
        pos_q   <= '0;
        par_q   <= !par_q;
        first_q <= 1'b0;
      end else begin
        pos_q <= pos_q + PW'(1);
      end
    end
  end

endmodule
