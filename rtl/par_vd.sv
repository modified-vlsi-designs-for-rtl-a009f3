// par_vd: parallel register-exchange Viterbi decoder.
//
// The ACS recursion of a Viterbi decoder is a feedback loop and caps the rate
// of a single decoder. Here the received stream is cut into blocks of N
// symbols that two independent register-exchange decoder units decode side by
// side. Each block is decoded together with a warm-up stage of L symbols before
// it, so that its starting metrics no longer matter, and a tail stage of D
// symbols after it, so that its survivor paths have merged. Two units need
// L + N + D symbol times per N bits each, so the pair delivers
// S = 2N/(L+N+D) times the throughput of one unit running at the same clock.
// Put the other way, each unit has to take L + N + D symbols for every 2N
// input symbols, so units clocked at (L+N+D)/(2N) of the input rate (0.66 for
// the defaults) keep up with the input. In this RTL everything shares one
// clock and the input rate is one symbol per cycle; the front FIFOs absorb
// the symbols that both units need (warm-up and tail overlap).
//
// Datapath: block_demux -> front FIFO -> re_vd_unit -> rear FIFO (x2) ->
// block_mux.
//
// Interface: valid/ready hard-decision code symbols in (bit 0 from G0, bit 1
// from G1; the first symbol after reset starts in encoder state 0);
// valid/ready decoded bits out, in input order. A bit leaves only after the
// D-symbol tail behind its block has arrived, so a stream must be followed by
// at least D + N symbols of padding to flush its last block.
//
// K = 7, generators 133/171 and D = 6K = 42 are the design's evaluated
// configuration; the design gives no values for L and N, and L = 42, N = 256
// are this design's choices.
module par_vd
  import vit_pkg::*;
#(
  parameter int              K   = 7,
  parameter logic [MAXK-1:0] G0  = 16'o133,
  parameter logic [MAXK-1:0] G1  = 16'o171,
  parameter int              D   = 42,
  parameter int              L   = 42,
  parameter int              N   = 256,
  parameter int              FDEPTH = 16,
  parameter int              RDEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_sym,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic [1:0] unit_busy     // unit u accepted a symbol this cycle
);

  logic [1:0] f_push, f_full, f_empty, f_pop;
  logic [3:0] f_din  [2];
  logic [3:0] f_dout [2];
  logic [1:0] r_push, r_empty, r_pop, r_room, r_bit;

  block_demux #(.N(N), .L(L), .D(D)) u_demux (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_sym(in_sym),
    .push(f_push), .data(f_din), .full(f_full)
  );

  for (genvar u = 0; u < 2; u++) begin : g_unit
    logic unit_ready, unit_out, f_room, r_full;

    sync_fifo #(.WIDTH(4), .DEPTH(FDEPTH), .ROOM(1)) u_front (
      .clk(clk), .rst_n(rst_n),
      .push(f_push[u]), .din(f_din[u]),
      .pop(f_pop[u]), .dout(f_dout[u]),
      .empty(f_empty[u]), .full(f_full[u]), .room_ok(f_room)
    );

    re_vd_unit #(.K(K), .G0(G0), .G1(G1), .D(D), .L(L), .N(N)) u_vd (
      .clk(clk), .rst_n(rst_n),
      .in_valid(!f_empty[u]), .in_ready(unit_ready),
      .in_sym(f_dout[u][1:0]), .in_sob(f_dout[u][2]), .in_first(f_dout[u][3]),
      .out_room(r_room[u]),
      .out_valid(r_push[u]), .out_bit(unit_out)
    );

    assign f_pop[u]     = !f_empty[u] && unit_ready;
    assign unit_busy[u] = f_pop[u];

    // The demux only writes a front FIFO that has room, and a unit only takes
    // a symbol while its rear FIFO can absorb the whole pipeline.
    a_front_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                 f_push[u] |-> f_room);
    a_rear_ok:  assert property (@(posedge clk) disable iff (!rst_n)
                                 r_push[u] |-> !r_full);

    sync_fifo #(.WIDTH(1), .DEPTH(RDEPTH), .ROOM(3)) u_rear (
      .clk(clk), .rst_n(rst_n),
      .push(r_push[u]), .din(unit_out),
      .pop(r_pop[u]), .dout(r_bit[u]),
      .empty(r_empty[u]), .full(r_full), .room_ok(r_room[u])
    );
  end

  block_mux #(.N(N)) u_mux (
    .clk(clk), .rst_n(rst_n),
    .in_bit(r_bit), .in_empty(r_empty), .pop(r_pop),
    .out_valid(out_valid), .out_ready(out_ready), .out_bit(out_bit)
  );

endmodule
