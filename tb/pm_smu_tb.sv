// pm_smu_tb: tests the path-merging trace-back survivor memory in the K = 9
// configuration (generators 561/735 octal, trace-back length L = 54), fed by
// the ACS unit. Information bits are encoded by a reference encoder written
// here; single code-bit errors are injected every few symbols; the decoded
// bits must equal the information bits, the first must appear exactly 5*L/2
// survivor-memory steps after the first decision, and both merge outcomes
// (merge found, memory read needed) must occur.
module pm_smu_tb;
  localparam int K = 9, M = 8, NS = 256, L = 54, H = L / 2;
  localparam logic [15:0] G0 = 16'o561, G1 = 16'o735;
  localparam int NBIT = 2500, ERR_GAP = 11;

  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  logic [1:0] rx = '0;
  logic a_valid;
  logic [NS-1:0] a_dec;
  logic [M-1:0] a_best;
  logic out_valid, out_bit, modi_read, merge_hit;
  always #5 clk = ~clk;

  vit_acsu #(.K(K), .G0(G0), .G1(G1)) u_acsu (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_known(1'b1), .rx(rx), .out_valid(a_valid), .dec(a_dec), .best_state(a_best));

  pm_smu #(.M(M), .L(L)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(a_valid), .dec(a_dec), .best_state(a_best),
    .out_valid(out_valid), .out_bit(out_bit), .modi_read(modi_read), .merge_hit(merge_hit));

  bit info [NBIT];
  int checks = 0, failures = 0, n_out = 0, n_modi = 0, n_merge = 0;
  int n_step = 0, first_out_step = -1;

  function automatic logic [1:0] enc(input logic [15:0] sr);
    logic c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= sr[i];
      if (G1[K-1-i]) c1 ^= sr[i];
    end
    return {c1, c0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (modi_read) n_modi++;
    if (merge_hit) n_merge++;
    if (out_valid) begin
      if (first_out_step < 0) first_out_step = n_step;
      if (n_out < NBIT) begin
        checks++;
        if (out_bit !== info[n_out]) begin
          failures++;
          if (failures < 10) $display("bit %0d: %0d want %0d", n_out, out_bit, info[n_out]);
        end
      end
      n_out++;
    end
    if (a_valid) n_step++;     // survivor-memory steps taken so far
  end

  initial begin
    logic [15:0] sr;
    sr = '0;
    for (int i = 0; i < NBIT; i++) info[i] = 1'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NBIT + 4 * L; i++) begin
      logic [1:0] c;
      sr = {sr[14:0], (i < NBIT) ? info[i] : 1'b0};
      c = enc(sr);
      if (i % ERR_GAP == 3 || i % (2 * L) == H - 1) c ^= 2'(1 << ($urandom % 2));
      in_valid = 1; in_first = (i == 0); rx = c;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out < NBIT) begin failures++; $display("only %0d bits", n_out); end
    checks++;
    if (first_out_step != 5 * H + 1) begin failures++; $display("first output after %0d steps", first_out_step); end
    checks++;
    if (n_merge == 0 || n_modi == 0) begin failures++; $display("merges %0d, reads %0d", n_merge, n_modi); end
    $display("merges %0d, TB Modi memory reads %0d of %0d steps", n_merge, n_modi, n_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NBIT + 20 * L) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
