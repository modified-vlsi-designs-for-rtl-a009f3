// ldpc_sign_product_tb: random sign patterns for eight degree-6 check nodes;
// each S_c must be 1 exactly when an odd number of the messages are negative,
// and the ones count must equal the number of such check nodes.
module ldpc_sign_product_tb;
  localparam int P = 8, WR = 6;
  logic [WR-1:0] sign [P];
  logic [P-1:0] sc;
  logic [3:0] ones;
  int checks = 0, failures = 0;

  ldpc_sign_product #(.P(P), .WR(WR)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int n = 0;
      bit neg;
      for (int c = 0; c < P; c++) sign[c] = WR'($urandom);
      #1;
      for (int c = 0; c < P; c++) begin
        automatic int cnt = 0;
        for (int j = 0; j < WR; j++) if (sign[c][j]) cnt++;
        neg = (cnt % 2) == 1;
        if (neg) n++;
        checks++;
        if (sc[c] !== neg) begin failures++; if (failures < 10) $display("node %0d signs %b: S_c %0d", c, sign[c], sc[c]); end
      end
      checks++;
      if (int'(ones) != n) begin failures++; if (failures < 10) $display("ones %0d want %0d", ones, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
