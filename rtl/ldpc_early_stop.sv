// ldpc_early_stop: early stopping controller for iterative LDPC decoding.
//
// Undecodable blocks waste the full iteration budget. This controller watches
// S_S, the number of check nodes whose sign product is negative, once per
// iteration. For decodable blocks S_S falls steeply towards zero; for
// undecodable ones it stalls and wanders in a narrow band. The rule:
//   * after the first iteration, S_S^0 tells the SNR region: detection is
//     enabled only when S_S^0 > THR0 (low to medium SNR); at high SNR it stays
//     off so that it costs no performance;
//   * with detection on, D = S_S^(k-1) - S_S^k is formed after each further
//     iteration. The first time D < 0 (a rise of S_S) a fluctuation flag is
//     set. While the flag is set, a decrease smaller than DTH counts up a
//     slow-convergence counter, a decrease of DTH or more clears it, and
//     D <= 0 leaves it alone. When the counter exceeds T the block is
//     declared undecodable and decoding stops.
// The controller also ends decoding when the decoder reports a valid codeword
// or when MAXIT iterations have been done, so it is the complete stop logic.
//
// Interface (per block; start clears everything):
//   sc_valid, sc_ones  the number of S_c ones of a group of check nodes; the
//                      groups of one iteration are summed in a log2(M)-bit
//                      accumulator
//   iter_done          end of an iteration; the accumulated S_S is evaluated
//                      and the next accumulation starts
//   parity_ok          with iter_done: all check-sums of the hard decisions
//                      are zero
//   stop, reason       registered, one cycle after iter_done: decoding must end
// Thresholds THR0 = 780 and MAXIT = 100 are the design's values for its
// 4000-bit (3,6) code (440 is its THR0 for the 1974-bit (5,10) code). The
// design states that DTH and T are found by simulation but gives no numbers;
// DTH = 10 and T = 5 are this design's choices.
module ldpc_early_stop #(
  parameter int M     = 2000,   // number of check nodes
  parameter int CW    = 4,      // width of sc_ones
  parameter int THR0  = 780,
  parameter int DTH   = 10,
  parameter int T     = 5,
  parameter int MAXIT = 100,
  localparam int SW = $clog2(M + 1),
  localparam int IW = $clog2(MAXIT + 1),
  localparam int TW = $clog2(T + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          sc_valid,
  input  logic [CW-1:0] sc_ones,
  input  logic          iter_done,
  input  logic          parity_ok,
  output logic          stop,
  output ldpc_pkg::stop_reason_e reason,
  output logic [SW-1:0] ss_last,      // S_S of the last finished iteration
  output logic [IW-1:0] iters,        // iterations finished
  output logic          detect_en,
  output logic          fluct,
  output logic [TW-1:0] slow_cnt
);

  import ldpc_pkg::*;

  logic [SW-1:0]   acc_q, ss;
  logic signed [SW:0] delta;

  // S_S of the iteration that ends now, including a group arriving with it
  assign ss    = acc_q + (sc_valid ? SW'(sc_ones) : '0);
  assign delta = $signed({1'b0, ss_last}) - $signed({1'b0, ss});

  // Decision rule, evaluated on the S_S of the iteration that ends now.
  logic          en_n, fl_n;
  logic [TW-1:0] cnt_n;
  always_comb begin
    en_n  = detect_en;
    fl_n  = fluct;
    cnt_n = slow_cnt;
    if (iters == '0) begin
      en_n = (int'(ss) > THR0);
    end else if (detect_en) begin
      if (delta < 0) fl_n = 1'b1;
      if (fl_n && delta > 0) begin
        if (int'(delta) < DTH) cnt_n = (int'(slow_cnt) > T) ? slow_cnt : slow_cnt + TW'(1);
        else                   cnt_n = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      ss_last   <= '0;
      iters     <= '0;
      detect_en <= 1'b0;
      fluct     <= 1'b0;
      slow_cnt  <= '0;
      stop      <= 1'b0;
      reason    <= STOP_NONE;
    end else if (start) begin
      acc_q     <= '0;
      ss_last   <= '0;
      iters     <= '0;
      detect_en <= 1'b0;
      fluct     <= 1'b0;
      slow_cnt  <= '0;
      stop      <= 1'b0;
      reason    <= STOP_NONE;
    end else if (!stop) begin
      if (iter_done) begin
        acc_q     <= '0;
        ss_last   <= ss;
        iters     <= iters + IW'(1);
        detect_en <= en_n;
        fluct     <= fl_n;
        slow_cnt  <= cnt_n;
        if (parity_ok) begin
          stop <= 1'b1; reason <= STOP_VALID;
        end else if (en_n && int'(cnt_n) > T) begin
          stop <= 1'b1; reason <= STOP_UNDECODABLE;
        end else if (int'(iters) + 1 >= MAXIT) begin
          stop <= 1'b1; reason <= STOP_MAXITER;
        end
      end else if (sc_valid) begin
        acc_q <= ss;
      end
    end
  end

endmodule
