// block_mux: merges the decoded blocks of the two decoder units back into one
// stream in the original order.
//
// Blocks alternate between the units, so the multiplexer takes N bits from
// rear FIFO 0, then N bits from rear FIFO 1, and so on. It waits, and keeps
// the other FIFO untouched, while the FIFO whose turn it is is empty.
//
// Interface: head bits and empty flags of the two rear FIFOs in, pop strobes
// out; valid/ready output of the merged bit stream. One bit per cycle.
//
// The design gives the function; the counter-based selection is this design's.
module block_mux #(
  parameter int N = 256,
  localparam int PW = $clog2(N)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_bit,
  input  logic [1:0] in_empty,
  output logic [1:0] pop,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit
);

  logic [PW-1:0] cnt_q;
  logic          sel_q;

  always_comb begin
    out_valid = !in_empty[sel_q];
    out_bit   = in_bit[sel_q];
    pop       = '0;
    pop[sel_q] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      sel_q <= 1'b0;
    end else if (out_valid && out_ready) begin
      if (int'(cnt_q) == N - 1) begin
        cnt_q <= '0;
        sel_q <= !sel_q;
      end else begin
        cnt_q <= cnt_q + PW'(1);
      end
    end
  end

endmodule
