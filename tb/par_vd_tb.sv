// par_vd_tb: end-to-end test of the parallel register-exchange Viterbi decoder.
//
// Random information bits are encoded by a reference encoder written here (a
// shift register with tap masks, independent of the RTL), sparse single-bit
// channel errors are injected, and the code symbols are streamed in with
// optional random input gaps and output back-pressure. Every decoded bit must
// equal the information bit of the same index. The test also counts the
// mechanisms of the scheme: symbols shared by both units (warm-up and tail
// overlap), cycles in which both units decode at once, switches of the block
// multiplexer, and input stalls, and fails if any never happened. With a
// continuous input it checks that the decoder keeps up with one symbol per
// cycle.
module par_vd_tb;
  parameter int N       = 256;
  parameter int L       = 42;
  parameter int D       = 42;
  parameter int NBLK    = 12;
  parameter int ERR_GAP = 40;

  localparam int K = 7;
  localparam logic [15:0] G0 = 16'o133, G1 = 16'o171;
  localparam int NBIT = N * NBLK;
  localparam int NSYM = NBIT + N + D;       // padding flushes the last block

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [1:0] in_sym = '0;
  logic out_valid, out_ready = 1, out_bit;
  logic [1:0] unit_busy;

  always #5 clk = ~clk;

  par_vd #(.N(N), .L(L), .D(D)) dut (.*);

  bit info [NBIT];
  int checks = 0, failures = 0, n_out = 0;
  int n_shared = 0, n_both = 0, n_switch = 0, n_stall = 0;
  bit gaps = 0;        // phase 2: random gaps and back-pressure
  int cyc = 0, first_in = -1, last_out = -1;

  function automatic logic [1:0] enc(input logic [15:0] sr);
    logic c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= sr[i];
      if (G1[K-1-i]) c1 ^= sr[i];
    end
    return {c1, c0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_demux.push == 2'b11) n_shared++;
    if (unit_busy == 2'b11) n_both++;
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready && first_in < 0) first_in = cyc;
    if (out_valid && out_ready) begin
      if (n_out < NBIT) begin
        checks++;
        if (out_bit !== info[n_out]) begin
          failures++;
          if (failures < 10) $display("bit %0d: got %0d want %0d", n_out, out_bit, info[n_out]);
        end
        if (n_out % N == N - 1) n_switch++;
        if (n_out == NBIT - 1) last_out = cyc;
      end
      n_out++;
    end
    if (gaps) out_ready <= ($urandom % 4) != 0;
  end

  task automatic run_stream();
    logic [15:0] sr = '0;
    for (int i = 0; i < NBIT; i++) info[i] = 1'($urandom);
    for (int i = 0; i < NSYM; i++) begin
      logic u;
      logic [1:0] c;
      u  = (i < NBIT) ? info[i] : 1'b0;
      sr = {sr[14:0], u};
      c  = enc(sr);
      if (i % ERR_GAP == 7) c ^= 2'(1 << ($urandom % 2));
      if (gaps) while (($urandom % 5) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_sym   <= c;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: continuous input, output always ready
    run_stream();
    repeat (4 * (N + D)) @(posedge clk);
    checks++;
    if (n_out < NBIT) begin failures++; $display("phase 1: only %0d bits", n_out); end
    // rate: NBIT bits must leave within NBIT + latency cycles of the first
    // symbol (no loss of throughput while the two units share the work)
    checks++;
    if (last_out - first_in > NBIT + 2 * N + L + 2 * D + 16) begin
      failures++;
      $display("phase 1: %0d cycles for %0d bits", last_out - first_in, NBIT);
    end
    // phase 2: restart with gaps and back-pressure
    rst_n = 0;
    n_out = 0;
    @(posedge clk);
    rst_n = 1;
    gaps = 1;
    run_stream();
    while (n_out < NBIT) @(posedge clk);
    checks++;
    if (n_shared == 0) begin failures++; $display("no shared symbols"); end
    checks++;
    if (n_both == 0) begin failures++; $display("units never ran together"); end
    checks++;
    if (n_switch < 2) begin failures++; $display("block mux never switched"); end
    checks++;
    if (n_stall == 0) begin failures++; $display("input never stalled"); end
    $display("shared %0d, both busy %0d, block switches %0d, stalls %0d",
             n_shared, n_both, n_switch, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NSYM + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d bits out", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
