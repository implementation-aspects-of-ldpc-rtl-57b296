// tb_tail_generator: terminates frames of the m_s = 16 code with a tail of
// 2(m_s + 1) = 34 blocks. The testbench derives the tail coefficients on
// its own: with an encoder model it finds the linear maps from the
// starting state (A) and from the tail bits (B) to the state after the
// tail, and solves B g_i = A e_i over GF(2) by Gaussian elimination for
// every state bit i. It loads the table, then encodes three frames of
// different lengths with the real encoder, lets the tail generator drive
// the tail, and checks that the encoder is back in the zero state after
// each tail, that every check node of the frame (tail included) holds, and
// that each tail takes exactly 34 handshakes.
module tb_tail_generator;
  localparam int unsigned MS  = 16;
  localparam int unsigned TAU = 2 * (MS + 1);
  localparam int FL [3] = '{40, 77, 16};

  logic clk = 0, rst_n = 0;
  logic coef_we, start, busy, done, tg_valid, tg_u, tg_ready;
  logic [$clog2(TAU)-1:0] coef_addr;
  logic [MS:1] coef_data, state;
  logic u_valid, u, u_ready, v_valid, v_ready, state_zero;
  logic src_valid, src_u;
  logic [1:0] v;
  int checks = 0, failures = 0;

  bit [MS:1]    g [TAU];        // g[n][i]: coefficient of p_i for tail bit n
  bit           cw [4000][2];
  int           ncw = 0, ntail = 0;

  always #5 clk = ~clk;

  tail_generator #(.MS(MS), .TAU(TAU)) dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data, .start, .state, .busy,
    .done, .u_valid(tg_valid), .u(tg_u), .u_ready(tg_ready));

  psf_encoder #(.MS(MS)) enc (.clk, .rst_n, .u_valid, .u, .u_ready, .v_valid,
    .v, .v_ready, .state, .state_zero);

  assign u_valid  = busy ? tg_valid : src_valid;
  assign u        = busy ? tg_u : src_u;
  assign tg_ready = busy && u_ready;
  assign v_ready  = 1'b1;

  always @(posedge clk) begin
    if (rst_n && v_valid) begin
      cw[ncw][0] = v[0];
      cw[ncw][1] = v[1];
      ncw++;
    end
    if (rst_n && tg_valid && tg_ready) ntail++;
  end

  // encoder model: later checks of the information symbol at 6 and 16,
  // of the parity symbol at 4 and 13 time units
  function automatic bit [MS:1] enc_step(bit [MS:1] p, bit ub);
    bit v0, v1;
    bit [MS:1] q;
    v0 = ub;
    v1 = ub ^ p[1];
    for (int i = 1; i <= int'(MS); i++) begin
      bit h;
      h = ((i == 6 || i == 16) && v0) ^ ((i == 4 || i == 13) && v1);
      q[i] = ((i < int'(MS)) ? p[i+1] : 1'b0) ^ h;
    end
    return q;
  endfunction

  function automatic bit [MS:1] run_tail(bit [MS:1] p0, bit [TAU-1:0] ut);
    bit [MS:1] p;
    p = p0;
    for (int n = 0; n < int'(TAU); n++) p = enc_step(p, ut[n]);
    return p;
  endfunction

  function automatic bit sym(int t, int j);
    return (t < 0) ? 1'b0 : cw[t][j];
  endfunction

  task automatic solve_tail();
    bit [TAU-1:0] brow [MS+1];
    bit [MS:1]    arow [MS+1];
    int           pivcol [MS+1];
    int           r;
    // column n of B: state bits after an impulse tail from the zero state
    for (int i = 1; i <= int'(MS); i++) begin brow[i] = '0; arow[i] = '0; end
    for (int n = 0; n < int'(TAU); n++) begin
      bit [MS:1] s;
      bit [TAU-1:0] e;
      e = '0; e[n] = 1'b1;
      s = run_tail('0, e);
      for (int i = 1; i <= int'(MS); i++) brow[i][n] = s[i];
    end
    for (int c = 1; c <= int'(MS); c++) begin
      bit [MS:1] s, e;
      e = '0; e[c] = 1'b1;
      s = run_tail(e, '0);
      for (int i = 1; i <= int'(MS); i++) arow[i][c] = s[i];
    end
    // reduce [B | A] to reduced row echelon form
    r = 1;
    for (int c = 0; c < int'(TAU) && r <= int'(MS); c++) begin
      int pr;
      pr = 0;
      for (int i = r; i <= int'(MS); i++) if (brow[i][c] && pr == 0) pr = i;
      if (pr == 0) continue;
      begin
        bit [TAU-1:0] tb; bit [MS:1] ta;
        tb = brow[r]; brow[r] = brow[pr]; brow[pr] = tb;
        ta = arow[r]; arow[r] = arow[pr]; arow[pr] = ta;
      end
      for (int i = 1; i <= int'(MS); i++)
        if (i != r && brow[i][c]) begin
          brow[i] ^= brow[r];
          arow[i] ^= arow[r];
        end
      pivcol[r] = c;
      r++;
    end
    checks++;
    if (r != int'(MS) + 1) begin
      failures++;
      $display("FAIL tail section has rank %0d < %0d", r - 1, MS);
    end
    for (int n = 0; n < int'(TAU); n++) g[n] = '0;
    for (int i = 1; i < r; i++) g[pivcol[i]] = arow[i];
  endtask

  initial begin
    coef_we = 0; coef_addr = '0; coef_data = '0; start = 0;
    src_valid = 0; src_u = 0;
    solve_tail();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < int'(TAU); n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = n[$bits(coef_addr)-1:0]; coef_data = g[n];
    end
    @(negedge clk);
    coef_we = 0;
    for (int f = 0; f < 3; f++) begin
      int base, tail0;
      base = ncw;
      tail0 = ntail;
      for (int t = 0; t < FL[f]; t++) begin
        @(negedge clk);
        src_valid = 1; src_u = 1'($urandom);
        @(posedge clk);
        while (!u_ready) @(posedge clk);
      end
      @(negedge clk);
      src_valid = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      wait (done);
      @(posedge clk); @(posedge clk);
      checks++;
      if (!state_zero) begin
        failures++;
        $display("FAIL frame %0d: encoder not in the zero state after the tail", f);
      end
      checks++;
      if (ntail - tail0 != int'(TAU)) begin
        failures++;
        $display("FAIL frame %0d: tail of %0d blocks", f, ntail - tail0);
      end
      // all checks of the frame, including those that reach past its end
      for (int t = base; t < ncw + int'(MS); t++) begin
        bit s;
        s = ((t < ncw) ? sym(t,0) : 0) ^ ((t-6 < ncw) ? sym(t-6,0) : 0) ^
            ((t-16 < ncw) ? sym(t-16,0) : 0) ^ ((t < ncw) ? sym(t,1) : 0) ^
            ((t-4 < ncw) ? sym(t-4,1) : 0) ^ ((t-13 < ncw) ? sym(t-13,1) : 0);
        checks++;
        if (s) begin
          failures++;
          $display("FAIL frame %0d: check %0d does not hold", f, t - base);
        end
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
