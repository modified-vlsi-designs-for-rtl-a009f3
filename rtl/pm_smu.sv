// pm_smu: low-power trace-back survivor memory unit with path merging.
//
// The survivor memory is split into four banks of H = L/2 entries; each entry
// holds the 2^M decision bits of one trellis step. Every bank has a small
// buffer of H entries that holds the states of a traced path through it.
// Time is divided into periods of H steps. In period p:
//   WR       the decision bits from the ACSU are written into bank p mod 4 in
//            increasing address order;
//   TB       bank p-1, completed in the previous period, is traced back from
//            the best-metric state of its last step (a local trace); the
//            states visited are written into that bank's buffer;
//   TB Modi  bank p-3 is traced back again, continuing the trace that the TB
//            process left off one period earlier (so the path has already
//            been traced back H steps from a later best state). At each step
//            the traced state X is compared with the state Y stored in the
//            buffer. While they differ, the buffer entry is overwritten with X
//            and the memory is read to find the next state. Once X equals Y
//            the two paths have merged: the rest of the buffer is already the
//            right path and no more memory reads are done in this period;
//   DC       the buffer of bank p (modified in the previous period, its bank
//            now being rewritten) is read in decreasing order and the decoded
//            bit, the LSB of each stored state, goes into a LIFO that restores
//            time order.
// Each decision bit thus sees one write, one read by TB and at most one read by
// TB Modi; decode reads come from the buffer. The total latency from the first
// write of a bank to the last decoded bit of that bank is 3L steps.
//
// Interface: in_valid/dec/best_state come straight from the ACSU's out_valid,
// dec and best_state. One step per in_valid. out_valid/out_bit give decoded
// bits in order, once the pipeline has filled (after 5 periods); the bit leaving
// in step w of period q belongs to trellis step (q-5)*H + w. modi_read and
// merge_hit pulse when TB Modi reads the memory or finds a merge, for
// measuring the saving.
//
// Bank count and size, the buffer per bank, the process schedule and the
// merge test follow the design. Keeping a full state per buffer entry, the
// trace rule S(n-1) = {D, S(n) >> 1} with the decoded bit taken as the state's
// LSB, and the asynchronous-read arrays are this design's choices.
module pm_smu #(
  parameter int M = 6,          // K - 1 state bits
  parameter int L = 42,         // trace-back length, even
  localparam int NS = 2**M,
  localparam int H  = L / 2,
  localparam int AW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NS-1:0] dec,
  input  logic [M-1:0]  best_state,
  output logic          out_valid,
  output logic          out_bit,
  output logic          modi_read,
  output logic          merge_hit
);

  logic [NS-1:0] bank [4][H];
  logic [M-1:0]  buff [4][H];

  logic [AW-1:0] w_q;          // step within the period
  logic [1:0]    p_q;          // bank being written
  logic [2:0]    nper_q;       // completed periods, saturating at 5
  logic [M-1:0]  start_q;      // best state at the last write of a bank
  logic [M-1:0]  xf_q;         // TB trace state
  logic [M-1:0]  xm_q;         // TB Modi trace state
  logic          merged_q;

  logic [AW-1:0] a;
  logic [1:0]    pf, pm;
  logic [M-1:0]  xf, xm, y;
  logic          merged, dbit_f, dbit_m, lifo_out;

  always_comb begin
    a      = AW'(H - 1) - w_q;
    pf     = p_q - 2'd1;
    pm     = p_q + 2'd1;          // p - 3 modulo 4
    xf     = (w_q == '0) ? start_q : xf_q;
    xm     = (w_q == '0) ? xf_q    : xm_q;
    merged = (w_q == '0) ? 1'b0    : merged_q;
    y      = buff[pm][a];
    dbit_f = bank[pf][a][xf];
    dbit_m = bank[pm][a][xm];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q       <= '0;
      p_q       <= '0;
      nper_q    <= '0;
      start_q   <= '0;
      xf_q      <= '0;
      xm_q      <= '0;
      merged_q  <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      modi_read <= 1'b0;
      merge_hit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      modi_read <= 1'b0;
      merge_hit <= 1'b0;
      if (in_valid) begin
        // period bookkeeping
        if (w_q == AW'(H - 1)) begin
          w_q     <= '0;
          p_q     <= p_q + 2'd1;
          start_q <= best_state;
          if (nper_q != 3'd5) nper_q <= nper_q + 3'd1;
        end else begin
          w_q <= w_q + AW'(1);
        end
        // TB: local trace from the best state
        xf_q <= {dbit_f, xf[M-1:1]};
        // TB Modi with path merging
        if (merged || xm == y) begin
          merged_q  <= 1'b1;
          merge_hit <= ~merged;
        end else begin
          merged_q  <= 1'b0;
          xm_q      <= {dbit_m, xm[M-1:1]};
          modi_read <= 1'b1;
        end
        // decoded output from the LIFO
        out_valid <= (nper_q == 3'd5);
        out_bit   <= lifo_out;
      end
    end
  end

  // Memory and buffer writes (no reset: contents are written before use).
  always_ff @(posedge clk) begin
    if (in_valid) begin
      bank[p_q][w_q] <= dec;
      buff[pf][a]    <= xf;
      if (!(merged || xm == y)) buff[pm][a] <= xm;
    end
  end

  smu_lifo #(.H(H), .W(1)) u_lifo (
    .clk(clk), .rst_n(rst_n), .step(in_valid), .idx(w_q),
    .din(buff[p_q][a][0]), .dout(lifo_out)
  );

endmodule
