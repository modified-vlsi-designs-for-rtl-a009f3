// re_vd_unit: one register-exchange Viterbi decoder unit of the parallel
// decoder.
//
// The unit decodes one block at a time. A block is a run of symbols marked by
// sob on its first symbol: a warm-up stage of L symbols, the N symbols whose
// bits are wanted, and a tail stage of D symbols. On sob the path metrics are
// restarted: all equal when the block starts mid-stream (the warm-up stage
// makes the metrics independent of that guess), or with state 0 favoured for
// the first block of a stream (flag first, which also has no warm-up stage).
// The register-exchange survivor memory has length D, so the bit for symbol j
// of the block leaves the unit when symbol j + D - 1 is processed. The unit
// emits exactly the N bits of the middle part and drops the rest.
//
// Interface: a valid/ready symbol input (sym, sob, first), and a decoded-bit
// output to a FIFO. in_ready follows out_room, which must guarantee space for
// the two results still in the pipeline (ACSU and survivor registers), so
// out_valid never needs a ready. Throughput is one symbol per cycle.
//
// The block layout (warm-up L, data N, tail D) and the RE survivor memory are
// the design's; the restart rule for the metrics is this design's choice.
module re_vd_unit
  import vit_pkg::*;
#(
  parameter int              K   = 7,
  parameter logic [MAXK-1:0] G0  = 16'o133,
  parameter logic [MAXK-1:0] G1  = 16'o171,
  parameter int              D   = 42,
  parameter int              L   = 42,
  parameter int              N   = 256,
  parameter int              SMW = 10,
  localparam int M  = K - 1,
  localparam int NS = 2**M,
  localparam int TW = $clog2(L + N + D + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_sym,
  input  logic       in_sob,
  input  logic       in_first,
  input  logic       out_room,
  output logic       out_valid,
  output logic       out_bit
);

  logic          acc;
  logic [TW-1:0] t_q, t;
  logic          first_q, first;
  logic [TW-1:0] w;
  logic          emit, e1_q, e2_q;
  logic          a_valid, s_valid;
  logic [NS-1:0] a_dec;
  logic [M-1:0]  a_best;

  assign in_ready = out_room;
  assign acc      = in_valid && in_ready;

  always_comb begin
    t     = in_sob ? '0 : t_q;
    first = in_sob ? in_first : first_q;
    w     = first ? '0 : TW'(L);
    emit  = (t >= w + TW'(D - 1)) && (t < w + TW'(N + D - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q     <= '0;
      first_q <= 1'b0;
      e1_q    <= 1'b0;
      e2_q    <= 1'b0;
    end else begin
      if (acc) begin
        t_q     <= (t == '1) ? t : t + TW'(1);
        first_q <= first;
      end
      e1_q <= acc && emit;
      e2_q <= e1_q;
    end
  end

  vit_acsu #(.K(K), .G0(G0), .G1(G1), .SMW(SMW)) u_acsu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(acc), .in_first(in_sob), .in_known(in_first), .rx(in_sym),
    .out_valid(a_valid), .dec(a_dec), .best_state(a_best)
  );

  re_smu #(.M(M), .D(D)) u_smu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_valid), .dec(a_dec), .best_state(a_best),
    .out_valid(s_valid), .out_bit(out_bit)
  );

  assign out_valid = s_valid && e2_q;

endmodule
