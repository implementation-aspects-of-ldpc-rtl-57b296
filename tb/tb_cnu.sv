// tb_cnu: random and corner-case messages into the check node unit; each
// output is compared with the min-sum rule evaluated in plain integers:
// magnitude = smallest |input| over the other five edges, clipped to 31;
// sign = product of the other five signs (0 counted as positive).
module tb_cnu;
  import ldpccc_pkg::*;
  app_t [K-1:0] v2c;
  llr_t [K-1:0] c2v;
  int checks = 0, failures = 0;

  cnu dut (.v2c(v2c), .c2v(c2v));

  task automatic check_one();
    #1;
    for (int k = 0; k < K; k++) begin
      int m, s, e;
      m = 1000; s = 1;
      for (int i = 0; i < K; i++) if (i != k) begin
        int x;
        x = int'(v2c[i]);
        if (x < 0) begin s = -s; x = -x; end
        if (x < m) m = x;
      end
      if (m > 31) m = 31;
      e = s * m;
      checks++;
      if (int'(c2v[k]) != e) begin
        failures++;
        $display("FAIL edge %0d: got %0d exp %0d", k, c2v[k], e);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < K; k++) begin
        int r;
        r = int'($urandom % 255) - 127;
        if (n % 3 == 0) r = r / 8;
        v2c[k] = app_t'(r);
      end
      if (n % 7 == 0) v2c[1] = v2c[4];   // equal minima
      check_one();
    end
    for (int k = 0; k < K; k++) v2c[k] = app_t'(127);
    check_one();
    for (int k = 0; k < K; k++) v2c[k] = app_t'(-127);
    check_one();
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
