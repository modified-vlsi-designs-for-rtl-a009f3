// block_mux_tb: two queue-modelled FIFOs hold the decoded blocks of the two
// units, filled at random times. The multiplexer must output N bits of unit 0,
// then N of unit 1, and so on, never popping the unit whose turn it is not,
// with random output back-pressure.
module block_mux_tb;
  localparam int N = 16, NBLK = 10;
  logic clk = 0, rst_n = 0, out_ready = 0;
  logic [1:0] in_bit, in_empty, pop;
  logic out_valid, out_bit;
  always #5 clk = ~clk;

  block_mux #(.N(N)) dut (.*);

  bit q0 [$], q1 [$];
  bit expect_q [$];
  int checks = 0, failures = 0, n_out = 0;

  // FIFO heads as seen by the multiplexer
  task automatic show();
    in_empty = {q1.size() == 0, q0.size() == 0};
    in_bit   = {q1.size() ? q1[0] : 1'b0, q0.size() ? q0[0] : 1'b0};
  endtask

  initial begin
    bit b0 [$], b1 [$];
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < N; i++) begin
        automatic bit v = 1'($urandom);
        expect_q.push_back(v);
        if (b % 2 == 0) b0.push_back(v); else b1.push_back(v);
      end
    show();
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (n_out < N * NBLK) begin
      if (b0.size() && $urandom % 3 == 0) q0.push_back(b0.pop_front());
      if (b1.size() && $urandom % 3 == 0) q1.push_back(b1.pop_front());
      out_ready = $urandom % 3 != 0;
      show();
      #1;
      checks++;
      if (out_valid && out_ready) begin
        if (out_bit !== expect_q[n_out] || $countones(pop) != 1) begin
          failures++;
          if (failures < 10) $display("bit %0d: %0d want %0d, pop %b", n_out, out_bit, expect_q[n_out], pop);
        end
        if (pop[0]) void'(q0.pop_front());
        if (pop[1]) void'(q1.pop_front());
        n_out++;
      end else if (pop != 0) begin
        failures++;
        $display("pop without transfer");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * N * NBLK) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
