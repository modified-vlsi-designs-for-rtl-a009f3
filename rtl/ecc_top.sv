// ecc_top: the three error-correction designs side by side.
//
//   lp_*  low-power trace-back Viterbi decoder (lpvd): rate-1/2, K = 7 code,
//         path-merging survivor memory with four L/2-entry banks
//   pv_*  parallel register-exchange Viterbi decoder (par_vd): two decoder
//         units on overlapping blocks, with front/rear FIFOs
//   ld_*  LDPC early stopping: sign products of LDPC_P check nodes per cycle
//         (ldpc_sign_product) summed into S_S and judged per iteration by the
//         stop controller (ldpc_early_stop). The message-passing decoder that
//         produces the message signs is outside this top: its sign bits,
//         iteration and parity strobes come in on the ld_* inputs.
//
// The designs share only the clock and reset. Each port group is described in
// the module that it belongs to.
module ecc_top
  import vit_pkg::*;
  import ldpc_pkg::*;
#(
  parameter int LDPC_P  = 8,      // check nodes per cycle
  parameter int LDPC_WR = 6,      // check node degree
  parameter int LDPC_M  = 2000    // check nodes
) (
  input  logic       clk,
  input  logic       rst_n,
  // low-power trace-back Viterbi decoder
  input  logic       lp_in_valid,
  input  logic [1:0] lp_rx,
  output logic       lp_out_valid,
  output logic       lp_out_bit,
  output logic       lp_modi_read,
  output logic       lp_merge_hit,
  // parallel RE Viterbi decoder
  input  logic       pv_in_valid,
  output logic       pv_in_ready,
  input  logic [1:0] pv_in_sym,
  output logic       pv_out_valid,
  input  logic       pv_out_ready,
  output logic       pv_out_bit,
  output logic [1:0] pv_unit_busy,
  // LDPC early stopping
  input  logic                      ld_start,
  input  logic                      ld_sign_valid,
  input  logic [LDPC_WR-1:0]        ld_sign [LDPC_P],
  input  logic                      ld_iter_done,
  input  logic                      ld_parity_ok,
  output logic                      ld_stop,
  output stop_reason_e              ld_reason,
  output logic [$clog2(LDPC_M+1)-1:0] ld_ss,
  output logic [$clog2(101)-1:0]    ld_iters,
  output logic                      ld_detect_en,
  output logic [LDPC_P-1:0]         ld_sc,
  output logic                      ld_fluct,
  output logic [2:0]                ld_slow_cnt
);

  lpvd u_lpvd (
    .clk(clk), .rst_n(rst_n),
    .in_valid(lp_in_valid), .rx(lp_rx),
    .out_valid(lp_out_valid), .out_bit(lp_out_bit),
    .modi_read(lp_modi_read), .merge_hit(lp_merge_hit)
  );

  par_vd u_par_vd (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pv_in_valid), .in_ready(pv_in_ready), .in_sym(pv_in_sym),
    .out_valid(pv_out_valid), .out_ready(pv_out_ready), .out_bit(pv_out_bit),
    .unit_busy(pv_unit_busy)
  );

  localparam int CW = $clog2(LDPC_P + 1);
  logic [CW-1:0]     ones;

  ldpc_sign_product #(.P(LDPC_P), .WR(LDPC_WR)) u_sign (
    .sign(ld_sign), .sc(ld_sc), .ones(ones)
  );

  ldpc_early_stop #(.M(LDPC_M), .CW(CW)) u_stop (
    .clk(clk), .rst_n(rst_n), .start(ld_start),
    .sc_valid(ld_sign_valid), .sc_ones(ones),
    .iter_done(ld_iter_done), .parity_ok(ld_parity_ok),
    .stop(ld_stop), .reason(ld_reason), .ss_last(ld_ss), .iters(ld_iters),
    .detect_en(ld_detect_en), .fluct(ld_fluct), .slow_cnt(ld_slow_cnt)
  );

endmodule
