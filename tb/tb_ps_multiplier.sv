// tb_ps_multiplier: checks the partial syndrome multiplier for m_s = 32
// against the code's check offsets written out by hand: the information
// symbol is checked again after 11 and 32 time units, the parity symbol
// after 7 and 25 (m_s/3 + 1, m_s, m_s/5 + 1, 3m_s/4 + 1).
module tb_ps_multiplier;
  localparam int unsigned MS = 32;
  logic [1:0]  v;
  logic [MS:1] prod;
  int checks = 0, failures = 0;

  ps_multiplier #(.MS(MS)) dut (.v(v), .prod(prod));

  initial begin
    for (int n = 0; n < 4; n++) begin
      v = n[1:0];
      #1;
      for (int i = 1; i <= MS; i++) begin
        logic exp;
        exp = ((i == 11 || i == 32) && v[0]) ^ ((i == 7 || i == 25) && v[1]);
        checks++;
        if (prod[i] !== exp) begin
          failures++;
          $display("FAIL v=%b i=%0d got %b exp %b", v, i, prod[i], exp);
        end
      end
    end
    // exactly J - 1 = 2 products per symbol
    v = 2'b01; #1; checks++; if ($countones(prod) != 2) failures++;
    v = 2'b10; #1; checks++; if ($countones(prod) != 2) failures++;
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
