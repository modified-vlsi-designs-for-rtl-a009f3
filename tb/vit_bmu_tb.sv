// vit_bmu_tb: exhaustive check of the hard-decision branch metric unit for
// rate-1/2 and rate-1/3 symbols: every metric must be the number of bit
// positions in which the received symbol differs from the expected one.
module vit_bmu_tb;
  logic [1:0] rx2;
  logic [1:0] bm2 [4];
  logic [2:0] rx3;
  logic [1:0] bm3 [8];
  int checks = 0, failures = 0;

  vit_bmu #(.NOUT(2)) u2 (.rx(rx2), .bm(bm2));
  vit_bmu #(.NOUT(3)) u3 (.rx(rx3), .bm(bm3));

  function automatic int hd(input int a, input int b);
    int n = 0;
    for (int i = 0; i < 8; i++) if (((a >> i) & 1) != ((b >> i) & 1)) n++;
    return n;
  endfunction

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx2 = 2'(r); #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm2[c]) != hd(r, c)) begin failures++; $display("rate 1/2 rx=%0d c=%0d bm=%0d", r, c, bm2[c]); end
      end
    end
    for (int r = 0; r < 8; r++) begin
      rx3 = 3'(r); #1;
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (int'(bm3[c]) != hd(r, c)) begin failures++; $display("rate 1/3 rx=%0d c=%0d bm=%0d", r, c, bm3[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
