// ldpc_early_stop_tb: checks the LDPC early stopping controller against a
// behavioural model of the stopping rule written here.
//
// Each trial is a sequence of per-iteration S_S values; the testbench feeds each
// value as a burst of group counts (at most 8 per group, as from eight check
// nodes per cycle), pulses iter_done, and compares stop, reason, iteration count,
// S_S and the detection flags with the model after every iteration. Directed
// trials cover the three outcomes (undecodable block detected, valid codeword,
// iteration limit with detection switched off at high SNR); random trials
// cover the rest. The test fails if any outcome never occurred.
module ldpc_early_stop_tb;
  import ldpc_pkg::*;
  localparam int THR0 = 780, DTH = 10, T = 5, MAXIT = 100;

  logic clk = 0, rst_n = 0, start = 0, sc_valid = 0, iter_done = 0, parity_ok = 0;
  logic [3:0] sc_ones = '0;
  logic stop, detect_en, fluct;
  stop_reason_e reason;
  logic [10:0] ss_last;
  logic [6:0] iters;
  logic [2:0] slow_cnt;

  always #5 clk = ~clk;

  ldpc_early_stop #(.M(2000), .CW(4)) dut (.*);

  int checks = 0, failures = 0;
  int n_undec = 0, n_valid = 0, n_max = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Runs one block. ss[k] is S_S of iteration k; valid_at is the iteration at
  // which the decoder finds a codeword (-1: never).
  task automatic run_block(input int ss[$], input int valid_at);
    // model state
    int m_prev = 0, m_cnt = 0, m_k = 0;
    bit m_en = 0, m_fl = 0, m_stop = 0;
    stop_reason_e m_reason = STOP_NONE;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < ss.size() && !m_stop; k++) begin
      int left = ss[k];
      // feed the groups
      while (left > 8) begin
        int g = 1 + $urandom % 8;
        sc_valid = 1; sc_ones = 4'(g); left -= g;
        @(negedge clk);
        sc_valid = 0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
      sc_valid = 1; sc_ones = 4'(left); iter_done = 1; parity_ok = (k == valid_at);
      @(negedge clk);
      sc_valid = 0; iter_done = 0; parity_ok = 0;
      // model
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
      check(stop == m_stop, $sformatf("stop after iteration %0d: %0d vs %0d", k, stop, m_stop));
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    // undecodable block: falls, rises once, then creeps down slowly
    ss = '{850, 760, 700, 650, 662, 655, 651, 648, 640, 636, 633, 630, 628, 625, 620};
    run_block(ss, -1);
    check(reason == STOP_UNDECODABLE && iters == 11, "directed undecodable");
    // decodable block: steep fall to a codeword
    ss = '{820, 600, 380, 150, 40, 0};
    run_block(ss, 5);
    check(reason == STOP_VALID && iters == 6, "directed valid");
    // high SNR start (S_S^0 below threshold): detection off, stagnates to MAXIT
    ss.delete();
    for (int k = 0; k < MAXIT + 5; k++) ss.push_back(500 + ((k % 2) ? 3 : 0) - k / 50);
    run_block(ss, -1);
    check(reason == STOP_MAXITER && iters == MAXIT && !detect_en, "directed max iterations");
    // random blocks
    for (int t = 0; t < 25; t++) begin
      automatic int v = 700 + $urandom % 200;
      ss.delete();
      for (int k = 0; k < MAXIT + 2; k++) begin
        ss.push_back(v);
        v = v - 12 + int'($urandom % 20);
        if (v < 0) v = 0;
        if (v > 2000) v = 2000;
      end
      run_block(ss, ($urandom % 4 == 0) ? int'($urandom % 30) : -1);
    end
    check(n_undec > 0 && n_valid > 0 && n_max > 0, "all stop reasons seen");
    $display("undecodable %0d, valid %0d, max-iteration %0d", n_undec, n_valid, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
