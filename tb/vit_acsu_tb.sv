// vit_acsu_tb: checks the add-compare-select unit step by step against a
// behavioural Viterbi metric recursion written here with unbounded integer
// metrics and its own encoder tap masks. For each random received symbol the
// decision bits of all 64 states and the best state (smallest metric, lowest
// index on ties) must match. Both start modes (known state 0 and unknown
// start) are exercised by restarting the trellis with in_first.
module vit_acsu_tb;
  localparam int K = 7, M = 6, NS = 64;
  localparam logic [15:0] G0 = 16'o133, G1 = 16'o171;

  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_known = 0;
  logic [1:0] rx = '0;
  logic out_valid;
  logic [NS-1:0] dec;
  logic [M-1:0] best_state;

  always #5 clk = ~clk;
  vit_acsu dut (.*);

  int checks = 0, failures = 0;
  int pm [NS];

  function automatic int code(input int w);   // w = {pred MSB, state}: K bits
    int c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= (w >> i) & 1;
      if (G1[K-1-i]) c1 ^= (w >> i) & 1;
    end
    return c1 * 2 + c0;
  endfunction

  function automatic int hd2(input int a, input int b);
    return ((a ^ b) & 1) + (((a ^ b) >> 1) & 1);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      automatic int npm [NS];
      automatic logic [NS-1:0] edec;
      automatic int best;
      automatic bit first = (t == 0) || (t == 300);
      automatic bit known = (t == 0);
      if (first) for (int s = 0; s < NS; s++) pm[s] = (known && s != 0) ? 128 : 0;
      in_valid = 1; in_first = first; in_known = known; rx = 2'($urandom);
      for (int s = 0; s < NS; s++) begin
        automatic int p0 = s >> 1, p1 = (s >> 1) | 32;
        automatic int m0 = pm[p0] + hd2(int'(rx), code(s));
        automatic int m1 = pm[p1] + hd2(int'(rx), code(s | 64));
        edec[s] = m1 < m0;
        npm[s] = edec[s] ? m1 : m0;
      end
      pm = npm;
      best = 0;
      for (int s = 1; s < NS; s++) if (pm[s] < pm[best]) best = s;
      @(negedge clk);
      in_valid = ($urandom % 4) == 0 ? 0 : 1;
      checks++;
      if (!out_valid || dec !== edec || int'(best_state) != best) begin
        failures++;
        if (failures < 5) $display("step %0d: dec %h vs %h, best %0d vs %0d", t, dec, edec, best_state, best);
      end
      // optional idle cycle: outputs must hold
      if (!in_valid) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("out_valid without input"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
