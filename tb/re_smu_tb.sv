// re_smu_tb: tests the register-exchange survivor memory fed by the ACS unit
// on a continuous error-free stream (rate 1/2, K = 7, 133/171) from state 0.
// Each output must be the information bit D-1 steps before the step just
// processed, one cycle after the decisions; with single errors injected the
// output must still be right.
module re_smu_tb;
  localparam int K = 7, M = 6, NS = 64, D = 42, NBIT = 2000;
  localparam logic [15:0] G0 = 16'o133, G1 = 16'o171;

  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  logic [1:0] rx = '0;
  logic a_valid;
  logic [NS-1:0] a_dec;
  logic [M-1:0] a_best;
  logic out_valid, out_bit;
  always #5 clk = ~clk;

  vit_acsu #(.K(K)) u_acsu (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_known(1'b1), .rx(rx), .out_valid(a_valid), .dec(a_dec), .best_state(a_best));
  re_smu #(.M(M), .D(D)) dut (.clk(clk), .rst_n(rst_n), .in_valid(a_valid), .dec(a_dec),
    .best_state(a_best), .out_valid(out_valid), .out_bit(out_bit));

  bit info [NBIT];
  int checks = 0, failures = 0, n_v = 0;

  function automatic logic [1:0] enc(input logic [15:0] sr);
    logic c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= sr[i];
      if (G1[K-1-i]) c1 ^= sr[i];
    end
    return {c1, c0};
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    // output n_v belongs to trellis step n_v, so to bit n_v - (D-1)
    if (n_v >= D - 1 && n_v - (D - 1) < NBIT) begin
      checks++;
      if (out_bit !== info[n_v-(D-1)]) begin
        failures++;
        if (failures < 10) $display("bit %0d: %0d want %0d", n_v - (D - 1), out_bit, info[n_v-(D-1)]);
      end
    end
    n_v++;
  end

  initial begin
    logic [15:0] sr;
    sr = '0;
    for (int i = 0; i < NBIT; i++) info[i] = 1'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NBIT + D; i++) begin
      logic [1:0] c;
      sr = {sr[14:0], (i < NBIT) ? info[i] : 1'b0};
      c = enc(sr);
      if (i % 37 == 20) c ^= 2'(1 << ($urandom % 2));
      in_valid = 1; in_first = (i == 0); rx = c;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_v != NBIT + D) begin failures++; $display("%0d outputs", n_v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NBIT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
