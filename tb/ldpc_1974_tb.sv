// ldpc_1974_tb: the early stopping logic in the configuration used for the
// 1974-bit (5,10) rate-1/2 LDPC code: 987 check nodes of row weight 10, an
// S_S^0 threshold of 440 and at most 100 iterations.
//
// Unlike the controller's unit test, S_S is not handed over as a number: for
// every iteration the testbench builds the sign bits of the ten messages
// entering each of the 987 check nodes, with a chosen set of check nodes
// having an odd number of negative messages, and streams them eight check
// nodes per cycle through the sign-product block into the controller. The
// sign products are compared with the intended parity of each check node,
// and the stop decision after each iteration with a behavioural model of the
// stopping rule. Directed blocks cover an undecodable block caught early (once
// with a large fall that restarts the slow-convergence count), a
// decodable block ending on a valid codeword, and a high-SNR block (S_S^0 at
// or below the threshold) for which detection stays off; random blocks follow.
module ldpc_1974_tb;
  import ldpc_pkg::*;
  localparam int M = 987, WR = 10, P = 8;
  localparam int THR0 = 440, DTH = 10, T = 5, MAXIT = 100;
  localparam int SW = $clog2(M + 1);

  logic clk = 0, rst_n = 0, start = 0, sc_valid = 0, iter_done = 0, parity_ok = 0;
  logic [WR-1:0] sign [P];
  logic [P-1:0] sc;
  logic [3:0] ones;
  logic stop, detect_en, fluct;
  stop_reason_e reason;
  logic [SW-1:0] ss_last;
  logic [6:0] iters;
  logic [2:0] slow_cnt;

  always #5 clk = ~clk;

  ldpc_sign_product #(.P(P), .WR(WR)) u_sp (.sign(sign), .sc(sc), .ones(ones));

  ldpc_early_stop #(.M(M), .CW(4), .THR0(THR0), .DTH(DTH), .T(T), .MAXIT(MAXIT)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .sc_valid(sc_valid), .sc_ones(ones),
    .iter_done(iter_done), .parity_ok(parity_ok), .stop(stop), .reason(reason),
    .ss_last(ss_last), .iters(iters), .detect_en(detect_en), .fluct(fluct),
    .slow_cnt(slow_cnt));

  int checks = 0, failures = 0;
  int n_undec = 0, n_valid = 0, n_max = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Streams one iteration whose S_S is ss: check node c is odd when its
  // scrambled index (c * 100 + offs) mod M, a permutation of 0..M-1 since
  // gcd(100, 987) = 1, is below ss.
  task automatic feed_iteration(input int ss, input bit last_valid);
    int offs = int'($urandom % M);
    for (int c0 = 0; c0 < M; c0 += P) begin
      logic [P-1:0] want;
      for (int j = 0; j < P; j++) begin
        int c = c0 + j;
        logic [WR-1:0] v = WR'($urandom);
        logic odd = (c < M) && (((c * 100 + offs) % M) < ss);
        if (^v != odd) v ^= WR'(1) << ($urandom % WR);
        sign[j] = v;
        want[j] = odd;
      end
      sc_valid  = 1;
      iter_done = (c0 + P >= M);
      parity_ok = iter_done && last_valid;
      #1 check(sc == want, $sformatf("sign products of check nodes %0d..%0d", c0, c0 + P - 1));
      @(negedge clk);
    end
    sc_valid = 0; iter_done = 0; parity_ok = 0;
    foreach (sign[j]) sign[j] = '0;
  endtask

  task automatic run_block(input int ss[$], input int valid_at);
    int m_prev = 0, m_cnt = 0, m_k = 0;
    bit m_en = 0, m_fl = 0, m_stop = 0;
    stop_reason_e m_reason = STOP_NONE;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < ss.size() && !m_stop; k++) begin
      feed_iteration(ss[k], k == valid_at);
      if (k == 0) m_en = (ss[0] > THR0);
      else if (m_en) begin
        int d = m_prev - ss[k];
        if (d < 0) m_fl = 1;
        if (m_fl && d > 0) begin
          if (d < DTH) m_cnt = (m_cnt > T) ? m_cnt : m_cnt + 1;
          else m_cnt = 0;
        end
      end
      m_prev = ss[k];
      m_k = k + 1;
      if (k == valid_at) begin m_stop = 1; m_reason = STOP_VALID; end
      else if (m_en && m_cnt > T) begin m_stop = 1; m_reason = STOP_UNDECODABLE; end
      else if (m_k >= MAXIT) begin m_stop = 1; m_reason = STOP_MAXITER; end
      check(stop == m_stop, $sformatf("stop after iteration %0d", k));
      check(reason == m_reason, $sformatf("reason after iteration %0d: %s vs %s", k, reason.name(), m_reason.name()));
      check(int'(iters) == m_k, "iteration count");
      check(int'(ss_last) == ss[k], $sformatf("S_S %0d vs %0d", ss_last, ss[k]));
      check(detect_en == m_en && fluct == m_fl && int'(slow_cnt) == m_cnt, "detection state");
    end
    case (m_reason)
      STOP_UNDECODABLE: n_undec++;
      STOP_VALID:       n_valid++;
      STOP_MAXITER:     n_max++;
      default: ;
    endcase
  endtask

  initial begin
    int ss[$];
    foreach (sign[j]) sign[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // undecodable: starts above 440, dips, rises once, then creeps down
    ss = '{520, 470, 430, 405, 414, 409, 404, 401, 396, 392, 389, 385, 380};
    run_block(ss, -1);
    check(reason == STOP_UNDECODABLE && iters == 11, "directed undecodable");
    // undecodable, but a fall of more than Delta_TH part-way restarts the count
    ss = '{510, 470, 478, 474, 471, 468, 465, 453, 450, 447, 444, 441, 438, 435, 432, 429};
    run_block(ss, -1);
    check(reason == STOP_UNDECODABLE && iters == 14, "directed undecodable with restart");
    // decodable: steep fall to a valid codeword
    ss = '{480, 300, 130, 25, 0};
    run_block(ss, 4);
    check(reason == STOP_VALID && iters == 5, "directed valid");
    // high SNR start: S_S^0 = 440 is not above the threshold, detection off
    ss.delete();
    for (int k = 0; k < MAXIT + 2; k++) ss.push_back(440 - k / 10 + ((k % 2) ? 4 : 0));
    run_block(ss, -1);
    check(reason == STOP_MAXITER && iters == MAXIT && !detect_en, "directed max iterations");
    // random blocks around the threshold
    for (int t = 0; t < 6; t++) begin
      automatic int v = 380 + int'($urandom % 140);
      ss.delete();
      for (int k = 0; k < MAXIT + 2; k++) begin
        ss.push_back(v);
        v = v - 8 + int'($urandom % 14);
        if (v < 0) v = 0;
        if (v > M) v = M;
      end
      run_block(ss, ($urandom % 3 == 0) ? int'($urandom % 30) : -1);
    end
    check(n_undec > 0 && n_valid > 0 && n_max > 0, "all stop reasons seen");
    $display("undecodable %0d, valid %0d, max-iteration %0d", n_undec, n_valid, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
