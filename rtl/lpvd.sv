// lpvd: low-power, memory-efficient hard-decision Viterbi decoder.
//
// A rate-1/2 convolutional decoder built from a branch metric unit and an
// add-compare-select unit (vit_acsu) and a trace-back survivor memory with
// path merging (pm_smu). The survivor memory needs 2L entries in four banks
// instead of 3L in six, reads each decision bit at most twice instead of
// three times, and decodes from small per-bank buffers instead of the memory.
// Decoding latency is 3L steps of the survivor memory.
//
// Interface:
//   in_valid, rx  one received hard-decision code symbol (bit 0 from G0,
//                 bit 1 from G1) per cycle with in_valid high; the first symbol
//                 after reset starts the trellis in state 0
//   out_valid, out_bit  decoded information bits, in order, one per input
//                 symbol once the pipeline is full; the first decoded bit
//                 appears 5*L/2 + 2 valid input cycles after the first symbol
//                 when the input is continuous
//   modi_read, merge_hit  activity of the trace-back modification (see pm_smu)
//
// Code (K = 7, generators 133/171 octal) and trace-back length L = 6K = 42
// follow the design's evaluation; the 561/735, K = 9, L = 54 code is the
// other configuration it evaluates and is selected with the parameters.
module lpvd
  import vit_pkg::*;
#(
  parameter int              K   = 7,
  parameter logic [MAXK-1:0] G0  = 16'o133,
  parameter logic [MAXK-1:0] G1  = 16'o171,
  parameter int              L   = 42,
  parameter int              SMW = 10,
  localparam int M  = K - 1,
  localparam int NS = 2**M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] rx,
  output logic       out_valid,
  output logic       out_bit,
  output logic       modi_read,
  output logic       merge_hit
);

  logic          started_q;
  logic          a_valid;
  logic [NS-1:0] a_dec;
  logic [M-1:0]  a_best;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        started_q <= 1'b0;
    else if (in_valid) started_q <= 1'b1;
  end

  vit_acsu #(.K(K), .G0(G0), .G1(G1), .SMW(SMW)) u_acsu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_first(!started_q), .in_known(1'b1), .rx(rx),
    .out_valid(a_valid), .dec(a_dec), .best_state(a_best)
  );

  pm_smu #(.M(M), .L(L)) u_smu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_valid), .dec(a_dec), .best_state(a_best),
    .out_valid(out_valid), .out_bit(out_bit),
    .modi_read(modi_read), .merge_hit(merge_hit)
  );

endmodule
