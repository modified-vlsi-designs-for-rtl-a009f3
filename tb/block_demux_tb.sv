// block_demux_tb: feeds numbered symbols through the block demultiplexer with
// random input gaps and random full flags, and checks every write against the
// block layout computed here: symbol k belongs to data block i = k / N (unit
// i mod 2), to the warm-up of block i+1 when k mod N >= N - L, and to the tail
// of block i-1 when k mod N < D. Start-of-block and first-block flags are
// checked too, as is that nothing is accepted while a target FIFO is full.
module block_demux_tb;
  localparam int N = 32, L = 10, D = 12, NSYM = 400;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [1:0] in_sym = '0, push, full = '0;
  logic [3:0] data [2];
  always #5 clk = ~clk;

  block_demux #(.N(N), .L(L), .D(D)) dut (.*);

  int checks = 0, failures = 0, k = 0, n_stall = 0, n_shared = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("symbol %0d: %s", k, what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (k < NSYM) begin
      int i, pos, own;
      bit oth, sob_o, sob_x;
      in_valid = ($urandom % 5) != 0;
      in_sym   = 2'(k);
      full     = 2'($urandom % 8 == 0 ? $urandom : 0);
      #1;
      i = k / N; pos = k % N; own = i % 2;
      oth   = (pos >= N - L) || (pos < D && i > 0);
      sob_o = (k == 0);
      sob_x = (pos == N - L);
      chk(in_ready == (!full[own] && !(oth && full[1-own])), "ready");
      if (in_valid && in_ready) begin
        chk(push[own] == 1'b1, "own push");
        chk(push[1-own] == oth, "other push");
        chk(data[own] == {i == 0, sob_o, 2'(k)}, "own data");
        if (oth) chk(data[1-own] == {1'b0, sob_x, 2'(k)}, "other data");
        if (oth) n_shared++;
        k++;
      end else begin
        chk(push == 2'b00, "push without accept");
        if (in_valid) n_stall++;
      end
      @(negedge clk);
    end
    chk(n_stall > 0 && n_shared > 0, "stalls and shared symbols seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NSYM) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
