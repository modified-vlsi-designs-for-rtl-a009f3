// re_vd_unit_tb: drives one decoder unit with blocks laid out as the block
// demultiplexer would: a first block (no warm-up, known start state) of N+D
// symbols and then mid-stream blocks of L+N+D symbols whose warm-up starts
// L symbols before the data. Exactly N decoded bits must come out per block and
// equal the information bits of the block's data part, with random input gaps
// and output room withdrawn at random.
module re_vd_unit_tb;
  localparam int K = 7, D = 42, L = 42, N = 64, NBLK = 6;
  localparam logic [15:0] G0 = 16'o133, G1 = 16'o171;
  localparam int NBIT = N * (NBLK + 1) + D;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sob = 0, in_first = 0, out_room = 1;
  logic in_ready, out_valid, out_bit;
  logic [1:0] in_sym = '0;
  always #5 clk = ~clk;

  re_vd_unit #(.D(D), .L(L), .N(N)) dut (.*);

  bit info [NBIT];
  logic [1:0] code [NBIT];
  int checks = 0, failures = 0, n_out = 0, exp_base = 0;
  int got [$];

  function automatic logic [1:0] enc(input logic [15:0] sr);
    logic c0 = 0, c1 = 0;
    for (int i = 0; i < K; i++) begin
      if (G0[K-1-i]) c0 ^= sr[i];
      if (G1[K-1-i]) c1 ^= sr[i];
    end
    return {c1, c0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) got.push_back(int'(out_bit));
    out_room <= ($urandom % 5) != 0;
  end

  task automatic send(input int from, input int len, input bit first);
    for (int i = 0; i < len; i++) begin
      while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sym = code[from + i]; in_sob = (i == 0); in_first = first;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    logic [15:0] sr;
    sr = '0;
    for (int i = 0; i < NBIT; i++) begin
      info[i] = 1'($urandom);
      sr = {sr[14:0], info[i]};
      code[i] = enc(sr);
      if (i % 45 == 30) code[i][0] ^= 1'b1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      got.delete();
      if (b == 0) send(0, N + D, 1);
      else        send(b * N - L, L + N + D, 0);
      repeat (6) @(negedge clk);
      checks++;
      if (got.size() != N) begin failures++; $display("block %0d: %0d bits", b, got.size()); end
      for (int i = 0; i < N && i < got.size(); i++) begin
        checks++;
        if (got[i] != int'(info[b * N + i])) begin
          failures++;
          if (failures < 10) $display("block %0d bit %0d: %0d want %0d", b, i, got[i], info[b * N + i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * NBIT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
