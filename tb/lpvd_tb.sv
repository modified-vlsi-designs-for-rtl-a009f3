// lpvd_tb: end-to-end test of the low-power trace-back Viterbi decoder.
//
// Random information bits are encoded by a reference convolutional encoder
// written here independently of the RTL (a shift register and tap masks),
// occasional single code-bit errors are injected far enough apart for the code
// to correct them (some of them on the last step of a survivor-memory bank,
// where they mislead the local trace-back and force memory reads), and the stream is fed continuously to the decoder. Every
// decoded bit is compared with the information bit of the same index. The test
// also checks the latency of the first decoded bit (5*L/2 + 2 cycles), that
// path merges occur, and that the trace-back modification reads the memory
// less than a conventional second trace-back would.
module lpvd_tb;
  parameter int              K    = 7;
  parameter logic [15:0]     G0   = 16'o133;
  parameter logic [15:0]     G1   = 16'o171;
  parameter int              L    = 42;
  parameter int              NBIT = 3000;
  parameter int              ERR_GAP = 14;   // code symbols between errors

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [1:0] rx = '0;
  logic out_valid, out_bit, modi_read, merge_hit;

  always #5 clk = ~clk;

  lpvd #(.K(K), .G0(G0), .G1(G1), .L(L)) dut (.*);

  bit info [NBIT];
  int checks = 0, failures = 0;
  int n_out = 0, n_in = 0, first_out_cycle = -1, cycle = 0;
  int n_modi = 0, n_merge = 0, n_err = 0, start_cycle = -1;

  // reference encoder: sr[0] is the current input, sr[i] the input i steps back
  function automatic logic [1:0] enc(input logic [15:0] sr);
    logic c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= sr[i];
      if (G1[K-1-i]) c1 ^= sr[i];
    end
    return {c1, c0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (in_valid && start_cycle < 0) start_cycle = cycle;
    if (modi_read) n_modi++;
    if (merge_hit) n_merge++;
    if (out_valid) begin
      if (first_out_cycle < 0) first_out_cycle = cycle;
      if (n_out < NBIT) begin
        checks++;
        if (out_bit !== info[n_out]) begin
          failures++;
          if (failures < 10) $display("mismatch bit %0d: got %0d want %0d", n_out, out_bit, info[n_out]);
        end
      end
      n_out++;
    end
  end

  initial begin
    automatic logic [15:0] sr = '0;
    for (int i = 0; i < NBIT; i++) info[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // continuous stream: information bits, then zeros to flush the pipeline
    for (int i = 0; i < NBIT + 4 * L; i++) begin
      logic u;
      logic [1:0] c;
      u  = (i < NBIT) ? info[i] : 1'b0;
      sr = {sr[14:0], u};
      c  = enc(sr);
      if (i % ERR_GAP == ERR_GAP / 2 || i % (2 * L) == L / 2 - 1) begin
        c ^= 2'(1 << ($urandom % 2));
        n_err++;
      end
      in_valid <= 1'b1;
      rx       <= c;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    // all bits decoded
    checks++;
    if (n_out < NBIT) begin failures++; $display("only %0d bits decoded", n_out); end
    // latency: first symbol is sampled at start_cycle, first bit out 5H+2 later
    checks++;
    if (first_out_cycle - start_cycle != 5 * (L / 2) + 2) begin
      failures++;
      $display("latency %0d, expected %0d", first_out_cycle - start_cycle, 5 * (L / 2) + 2);
    end
    // mechanisms: merges happened, and TB Modi read less than a full trace
    checks++;
    if (n_merge == 0) begin failures++; $display("no path merge seen"); end
    checks++;
    if (n_modi == 0) begin failures++; $display("TB Modi never read the memory"); end
    checks++;
    if (n_modi >= (NBIT + 4 * L) / 2) begin
      failures++;
      $display("TB Modi read %0d of %0d steps", n_modi, NBIT + 4 * L);
    end
    $display("errors injected %0d, merges %0d, TB Modi memory reads %0d of %0d steps",
             n_err, n_merge, n_modi, NBIT + 4 * L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBIT * 2 + 20 * L + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
