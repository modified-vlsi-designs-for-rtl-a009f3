// smu_lifo_tb: streams blocks of H random words through the LIFO with random
// idle cycles and checks that every block comes out in the reverse of the order
// it went in, one block later, across many direction changes.
module smu_lifo_tb;
  localparam int H = 21, W = 4, NB = 30;
  logic clk = 0, rst_n = 0, step = 0;
  logic [4:0] idx = '0;
  logic [W-1:0] din = '0, dout;
  always #5 clk = ~clk;

  smu_lifo #(.H(H), .W(W)) dut (.*);

  logic [W-1:0] data [NB][H];
  int checks = 0, failures = 0;

  initial begin
    for (int b = 0; b < NB; b++) for (int i = 0; i < H; i++) data[b][i] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < H; i++) begin
        while ($urandom % 4 == 0) begin step = 0; @(negedge clk); end
        step = 1; idx = 5'(i); din = data[b][i];
        #1;
        if (b > 0) begin
          checks++;
          if (dout !== data[b-1][H-1-i]) begin
            failures++;
            if (failures < 10) $display("block %0d step %0d: %h want %h", b, i, dout, data[b-1][H-1-i]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NB * H) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
