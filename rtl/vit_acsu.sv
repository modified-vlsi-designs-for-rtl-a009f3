// vit_acsu: add-compare-select unit of a rate-1/2 hard-decision Viterbi decoder.
//
// One trellis step per accepted symbol. The branch metric unit produces the
// four Hamming distances of the received symbol; 2^(K-1) ACS elements, one per
// state, add them to the predecessor metrics, keep the better path and emit a
// decision bit. The new metrics go back into the path metric registers. A
// comparison tree then finds the state with the best (smallest) metric, which
// the survivor memory uses as the starting point of its trace.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   in_valid  a symbol rx is present this cycle
//   in_first  this symbol starts a new trellis; the metrics it adds to are the
//             initial ones instead of the registered ones
//   in_known  with in_first: the encoder is known to start in state 0, so that
//             state starts at 0 and all others at a penalty; otherwise all
//             states start equal (unknown starting state)
//   out_valid one cycle after in_valid: dec holds the decision bits of that
//             step (dec[s] = MSB of the chosen predecessor of state s) and
//             best_state the state with the smallest metric after the step
//
// The structure (BMU, ACS array with metric feedback) is the usual Viterbi
// decoder organisation. The metric width, the wrap-around metrics and the
// initial-metric handling are this design's choices.
module vit_acsu
  import vit_pkg::*;
#(
  parameter int               K   = 7,
  parameter logic [MAXK-1:0]  G0  = 16'o133,
  parameter logic [MAXK-1:0]  G1  = 16'o171,
  parameter int               SMW = 10,
  localparam int M  = K - 1,
  localparam int NS = 2**M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_known,
  input  logic [1:0]    rx,
  output logic          out_valid,
  output logic [NS-1:0] dec,
  output logic [M-1:0]  best_state
);

  localparam int BMW = 2;
  localparam logic [SMW-1:0] INIT_OFS = SMW'(1) << (SMW - 3);

  logic [SMW-1:0] pm_q   [NS];
  logic [SMW-1:0] pm_old [NS];
  logic [SMW-1:0] pm_new [NS];
  logic [NS-1:0]  dec_new;
  logic [BMW-1:0] bm [4];

  vit_bmu #(.NOUT(2)) u_bmu (.rx(rx), .bm(bm));

  // Metrics entering this step.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      if (in_first)
        pm_old[s] = (in_known && s != 0) ? INIT_OFS : '0;
      else
        pm_old[s] = pm_q[s];
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_acs
    // Predecessors {0, s>>1} and {1, s>>1}; the branch window is {d, s}.
    localparam logic [M-1:0] P0 = M'(s >> 1);
    localparam logic [M-1:0] P1 = M'((s >> 1) | (1 << (M - 1)));
    localparam logic [1:0]   C0 = branch_code2(G0, G1, MAXK'(s), K);
    localparam logic [1:0]   C1 = branch_code2(G0, G1, MAXK'(s | (1 << M)), K);
    vit_acs #(.SMW(SMW), .BMW(BMW)) u_acs (
      .sm0(pm_old[P0]), .bm0(bm[C0]),
      .sm1(pm_old[P1]), .bm1(bm[C1]),
      .sm(pm_new[s]), .dec(dec_new[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) pm_q[s] <= '0;
      dec       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int s = 0; s < NS; s++) pm_q[s] <= pm_new[s];
        dec <= dec_new;
      end
    end
  end

  // Best-state search: a binary tree of modulo comparators over the registered
  // metrics. Node 1 is the root, nodes NS..2NS-1 the leaves.
  logic [SMW-1:0] tv [2*NS];
  logic [M-1:0]   ti [2*NS];
  always_comb begin
    for (int i = 0; i < NS; i++) begin
      tv[NS+i] = pm_q[i];
      ti[NS+i] = M'(i);
    end
    tv[0] = '0;
    ti[0] = '0;
    for (int i = NS - 1; i >= 1; i--) begin
      if (pm_less(16'(tv[2*i+1]), 16'(tv[2*i]), SMW)) begin
        tv[i] = tv[2*i+1];
        ti[i] = ti[2*i+1];
      end else begin
        tv[i] = tv[2*i];
        ti[i] = ti[2*i];
      end
    end
    best_state = ti[1];
  end

endmodule
