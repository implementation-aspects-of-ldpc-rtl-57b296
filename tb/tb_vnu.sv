// tb_vnu: random APP values and messages into the on-demand variable node
// unit, compared with integer arithmetic: v2c = sat(app - old),
// app_new = sat(v2c + new), sat clipping to +-127.
module tb_vnu;
  import ldpccc_pkg::*;
  app_t app, v2c, app_new;
  llr_t c2v_old, c2v_new;
  int checks = 0, failures = 0;

  vnu dut (.*);

  function automatic int sat(int x);
    return x > 127 ? 127 : (x < -127 ? -127 : x);
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int a, o, w, ev, ea;
      a = int'($urandom % 255) - 127;
      o = int'($urandom % 63) - 31;
      w = int'($urandom % 63) - 31;
      app = app_t'(a); c2v_old = llr_t'(o); c2v_new = llr_t'(w);
      #1;
      ev = sat(a - o);
      ea = sat(ev + w);
      checks += 2;
      if (int'(v2c) != ev) begin
        failures++;
        $display("FAIL v2c app=%0d old=%0d got %0d exp %0d", a, o, v2c, ev);
      end
      if (int'(app_new) != ea) begin
        failures++;
        $display("FAIL app_new got %0d exp %0d", app_new, ea);
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
