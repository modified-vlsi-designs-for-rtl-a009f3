// ecc_top_tb: end-to-end test of all three designs at their default sizes.
//
// Viterbi part: one stream of random information bits is encoded by a
// reference rate-1/2 K = 7 (133/171) encoder written here, sparse single
// code-bit errors are added, and the same symbols go to the low-power
// trace-back decoder (continuous) and to the parallel decoder (with random
// output back-pressure). Both decoded streams must equal the information bits.
//
// LDPC part: for each iteration the testbench generates the message sign bits
// of all 2000 check nodes (eight per cycle, degree 6) so that a scripted number
// of check nodes has a negative sign product, i.e. a scripted S_S sequence.
// Three blocks are run: an undecodable one (S_S stalls and wanders), a
// decodable one that ends in a valid codeword, and a high-SNR start whose
// detection must stay off until the 100-iteration limit.
//
// The mechanisms of each design are counted and must all occur: path merges and
// memory reads of the trace-back modification; shared overlap symbols (both
// units busy), block switches and input stalls of the parallel decoder; the
// three stop reasons, detection on and off, and the fluctuation flag.
module ecc_top_tb;
  import ldpc_pkg::*;
  localparam int K = 7, N = 256, D = 42;
  localparam logic [15:0] G0 = 16'o133, G1 = 16'o171;
  localparam int NBIT = 8 * N;
  localparam int NSYM = NBIT + N + D + 200;

  logic clk = 0, rst_n = 0;
  logic lp_in_valid = 0, lp_out_valid, lp_out_bit, lp_modi_read, lp_merge_hit;
  logic [1:0] lp_rx = '0;
  logic pv_in_valid = 0, pv_in_ready, pv_out_valid, pv_out_ready = 1, pv_out_bit;
  logic [1:0] pv_in_sym = '0, pv_unit_busy;
  logic ld_start = 0, ld_sign_valid = 0, ld_iter_done = 0, ld_parity_ok = 0;
  logic [5:0] ld_sign [8];
  logic ld_stop, ld_detect_en, ld_fluct;
  stop_reason_e ld_reason;
  logic [10:0] ld_ss;
  logic [6:0] ld_iters;
  logic [7:0] ld_sc;
  logic [2:0] ld_slow_cnt;

  always #5 clk = ~clk;

  ecc_top dut (.*);

  int checks = 0, failures = 0;
  bit info [NBIT];
  logic [1:0] code [NSYM];
  int lp_n = 0, pv_n = 0;
  int n_merge = 0, n_modi = 0, n_both = 0, n_stall = 0;
  int n_undec = 0, n_valid = 0, n_max = 0, n_fluct = 0, n_det_on = 0, n_det_off = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] enc(input logic [15:0] sr);
    logic c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= sr[i];
      if (G1[K-1-i]) c1 ^= sr[i];
    end
    return {c1, c0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (lp_merge_hit) n_merge++;
    if (lp_modi_read) n_modi++;
    if (pv_unit_busy == 2'b11) n_both++;
    if (pv_in_valid && !pv_in_ready) n_stall++;
    if (lp_out_valid) begin
      if (lp_n < NBIT) chk(lp_out_bit == info[lp_n], $sformatf("trace-back decoder bit %0d", lp_n));
      lp_n++;
    end
    if (pv_out_valid && pv_out_ready) begin
      if (pv_n < NBIT) chk(pv_out_bit == info[pv_n], $sformatf("parallel decoder bit %0d", pv_n));
      pv_n++;
    end
    pv_out_ready <= ($urandom % 8) != 0;
  end

  // trace-back decoder: continuous stream
  initial begin : lp_drive
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < NSYM; i++) begin
      lp_in_valid = 1; lp_rx = code[i];
      @(negedge clk);
    end
    lp_in_valid = 0;
  end

  // parallel decoder: valid/ready stream
  initial begin : pv_drive
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < NSYM; i++) begin
      pv_in_valid = 1; pv_in_sym = code[i];
      @(posedge clk);
      while (!pv_in_ready) @(posedge clk);
      @(negedge clk);
    end
    pv_in_valid = 0;
  end

  // One LDPC block with scripted S_S values; valid_at: iteration with a codeword.
  task automatic ldpc_block(input int ss[$], input int valid_at);
    @(negedge clk); ld_start = 1; @(negedge clk); ld_start = 0;
    for (int k = 0; k < ss.size() && !ld_stop; k++) begin
      int neg = ss[k];          // check nodes still to be made negative
      for (int g = 0; g < 250; g++) begin
        for (int c = 0; c < 8; c++) begin
          automatic logic [5:0] s = 6'($urandom);
          automatic int left = 2000 - (g * 8 + c);
          automatic bit want = (neg > 0) && (($urandom % left) < neg);
          if (neg >= left) want = 1;
          if ((^s) != want) s ^= 6'(1 << ($urandom % 6));
          if (want) neg--;
          ld_sign[c] = s;
        end
        ld_sign_valid = 1;
        ld_iter_done  = (g == 249);
        ld_parity_ok  = (g == 249) && (k == valid_at);
        @(negedge clk);
      end
      ld_sign_valid = 0; ld_iter_done = 0; ld_parity_ok = 0;
      chk(int'(ld_ss) == ss[k], $sformatf("S_S of iteration %0d: %0d vs %0d", k, ld_ss, ss[k]));
      if (ld_fluct) n_fluct++;
    end
    if (ld_detect_en) n_det_on++; else n_det_off++;
    case (ld_reason)
      STOP_UNDECODABLE: n_undec++;
      STOP_VALID:       n_valid++;
      STOP_MAXITER:     n_max++;
      default: chk(0, "block ended without a stop");
    endcase
  endtask

  initial begin
    int ss[$];
    logic [15:0] sr;
    for (int c = 0; c < 8; c++) ld_sign[c] = '0;
    sr = '0;
    for (int i = 0; i < NSYM; i++) begin
      if (i < NBIT) info[i] = 1'($urandom);
      sr = {sr[14:0], (i < NBIT) ? info[i] : 1'b0};
      code[i] = enc(sr);
      if (i % 23 == 11 || i % 84 == 20) code[i] ^= 2'(1 << ($urandom % 2));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // LDPC blocks, concurrently with the Viterbi streams
    ss = '{860, 760, 700, 655, 668, 660, 655, 652, 648, 645, 641, 639, 637, 633, 630};
    ldpc_block(ss, -1);
    chk(ld_reason == STOP_UNDECODABLE && ld_iters == 11, "undecodable block stops after 11 iterations");
    ss = '{830, 610, 390, 170, 60, 8, 0};
    ldpc_block(ss, 6);
    chk(ld_reason == STOP_VALID && ld_iters == 7, "decodable block ends on its codeword");
    ss.delete();
    for (int k = 0; k < 100; k++) ss.push_back(520 - k + ((k % 3 == 0) ? 6 : 0));
    ldpc_block(ss, -1);
    chk(ld_reason == STOP_MAXITER && ld_iters == 100 && !ld_detect_en, "high-SNR block runs to the limit");
    // wait for the Viterbi decoders
    while (lp_n < NBIT || pv_n < NBIT) @(negedge clk);
    chk(n_merge > 0, "path merges");
    chk(n_modi > 0, "trace-back modification memory reads");
    chk(n_modi < NSYM / 4, "trace-back modification reads well below one per step");
    chk(n_both > 0, "both parallel units busy");
    chk(n_stall > 0, "parallel decoder input stalls");
    chk(pv_n / N >= 2, "block multiplexer switched");
    chk(n_undec == 1 && n_valid == 1 && n_max == 1, "all three stop reasons");
    chk(n_det_on > 0 && n_det_off > 0, "detection enabled and disabled");
    chk(n_fluct > 0, "fluctuation flag");
    $display("merges %0d, TB Modi reads %0d / %0d steps; both units busy %0d, stalls %0d",
             n_merge, n_modi, NSYM, n_both, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d / %0d bits", lp_n, pv_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
