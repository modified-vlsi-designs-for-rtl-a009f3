// vit_acs_tb: random check of one add-compare-select element, including
// metrics that wrap around the 10-bit range. The expected survivor and
// decision are computed from the true (unwrapped) sums: decision 1 exactly when
// the branch from predecessor 1 is strictly better.
module vit_acs_tb;
  logic [9:0] sm0, sm1, sm;
  logic [1:0] bm0, bm1;
  logic dec;
  int checks = 0, failures = 0;

  vit_acs #(.SMW(10), .BMW(2)) dut (.*);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int base, a, b, p0, p1, win;
      bit d;
      base = $urandom % 1024;
      a = base + $urandom % 40;          // metrics within a small spread
      b = base + $urandom % 40;
      sm0 = 10'(a); sm1 = 10'(b);
      bm0 = 2'($urandom); bm1 = 2'($urandom);
      #1;
      p0 = a + bm0; p1 = b + bm1;
      d = p1 < p0;
      win = d ? p1 : p0;
      checks++;
      if (dec !== d || sm !== 10'(win)) begin
        failures++;
        if (failures < 10) $display("sm0=%0d bm0=%0d sm1=%0d bm1=%0d -> dec=%0d sm=%0d", a, bm0, b, bm1, dec, sm);
      end
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
