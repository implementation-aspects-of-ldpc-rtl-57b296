// tb_psf_encoder: encodes random information bits with m_s = 32 under random
// output back-pressure and checks every code block against the definition of
// the code: the information bit is passed unchanged, and the check node of
// every time t (v_t^(1) + v_{t-11}^(1) + v_{t-32}^(1) + v_t^(2) + v_{t-7}^(2)
// + v_{t-25}^(2), symbols before time 0 being 0) sums to zero. With the
// consumer always ready it must deliver one block per clock.
module tb_psf_encoder;
  localparam int unsigned MS = 32;
  localparam int N = 400;
  logic clk = 0, rst_n = 0;
  logic u_valid, u, u_ready, v_valid, v_ready, state_zero;
  logic [1:0] v;
  logic [MS:1] state;
  int checks = 0, failures = 0;
  bit info [N];
  bit cw0 [N], cw1 [N];
  int nout = 0, nin = 0;
  int first_cycle, last_cycle, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  psf_encoder #(.MS(MS)) dut (.*, .u(u));

  function automatic bit sym(int t, int j);
    if (t < 0) return 0;
    return j == 0 ? cw0[t] : cw1[t];
  endfunction

  // producer
  always @(posedge clk) begin
    if (rst_n && u_valid && u_ready) nin++;
  end
  assign u_valid = rst_n && (nin < N);
  assign u = info[nin % N];

  // consumer
  always @(posedge clk) begin
    if (rst_n && v_valid && v_ready) begin
      if (nout == 0) first_cycle = cycle;
      last_cycle = cycle;
      cw0[nout] = v[0];
      cw1[nout] = v[1];
      checks++;
      if (v[0] !== info[nout]) begin
        failures++;
        $display("FAIL t=%0d systematic bit", nout);
      end
      nout++;
    end
  end

  bit bp;
  initial begin
    for (int i = 0; i < N; i++) info[i] = 1'($urandom);
    bp = 1;
    v_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (!state_zero) failures++;
    // phase 1: consumer always ready (rate check), then random back-pressure
    forever begin
      @(negedge clk);
      v_ready = (nout < N/2) ? 1'b1 : 1'($urandom);
    end
  end

  initial begin
    wait (nout == N/2);
    checks++;
    if (last_cycle - first_cycle != N/2 - 1) begin
      failures++;
      $display("FAIL rate: %0d blocks in %0d cycles", N/2, last_cycle - first_cycle + 1);
    end
    wait (nout == N);
    for (int t = 0; t < N; t++) begin
      bit s;
      s = sym(t,0) ^ sym(t-11,0) ^ sym(t-32,0) ^ sym(t,1) ^ sym(t-7,1) ^ sym(t-25,1);
      checks++;
      if (s) begin
        failures++;
        $display("FAIL check node %0d unsatisfied", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
