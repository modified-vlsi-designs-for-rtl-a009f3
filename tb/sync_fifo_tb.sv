// sync_fifo_tb: random pushes and pops against a queue model. Checks the head
// word, empty, full and room flags every cycle, that pushes into a full FIFO
// and pops from an empty one are ignored, and that both limits were reached.
module sync_fifo_tb;
  localparam int W = 8, DEPTH = 6, ROOM = 3;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, room_ok;
  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(DEPTH), .ROOM(ROOM)) dut (.*);

  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      automatic int bias = (t / 500) % 2;       // alternate filling and draining phases
      push = ($urandom % 4) < (bias ? 3 : 1);
      pop  = ($urandom % 4) < (bias ? 1 : 3);
      din  = W'($urandom);
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
          room_ok != (q.size() + ROOM <= DEPTH) || (q.size() > 0 && dout !== q[0])) begin
        failures++;
        if (failures < 10) $display("t=%0d size %0d: empty %0d full %0d room %0d dout %h", t, q.size(), empty, full, room_ok, dout);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && q.size() < DEPTH + (pop && q.size() > 0 ? 1 : 0) && !full) q.push_back(din);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
