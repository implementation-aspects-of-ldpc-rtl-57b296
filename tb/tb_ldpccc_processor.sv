// tb_ldpccc_processor: one processor with m_s = 16 and stopping parameter
// P = 4, driven step by step the way the decoder controller does. Random
// slots (random APP values, messages and valid flags, with stretches of
// all-positive APP values so that the stopping rule fires) enter the
// region, and every slot that leaves is compared with a model that keeps
// the slots in a plain time-indexed array: at time t it activates the check
// node over symbols (t, t-6, t-16) of position 1 and (t, t-4, t-13) of
// position 2 with on-demand min-sum arithmetic, unless the stopping counter
// exceeds P, and emits slot t - 16. The model uses integers throughout.
module tb_ldpccc_processor;
  import ldpccc_pkg::*;
  localparam int unsigned MS = 16;
  localparam int unsigned P  = 4;
  localparam int NT = 600;
  localparam int D [2][3] = '{'{0, 6, 16}, '{0, 4, 13}};

  logic clk = 0, rst_n = 0;
  phase_t phase;
  logic [$clog2(MS+1)-1:0] init_addr;
  slot_t in_slot, out_slot;
  // a lone processor with the standard separation has no remote edges
  edge_req_t [C-1:0][J-1:0] rem_req_o, rem_req_i;
  edge_rsp_t [C-1:0][J-1:0] rem_rsp_o, rem_rsp_i;
  assign rem_req_i = '0;
  assign rem_rsp_i = '0;
  logic asleep, activated, skipped;
  int checks = 0, failures = 0, n_act = 0, n_skip = 0;

  // model state, index = time + MS (times -MS .. NT-1)
  int m_app [NT + MS][2];
  int m_c2v [NT + MS][2][3];
  bit m_val [NT + MS];
  int m_cnt = 0;

  always #5 clk = ~clk;

  ldpccc_processor #(.MS(MS), .P(P), .STOP_EN(1'b1)) dut (.*);

  function automatic int sat(int x, int lim);
    return x > lim ? lim : (x < -lim ? -lim : x);
  endfunction

  task automatic model_step(int t);
    int v2c [6], mag [6], sgn [6], idx [6][2];
    int sp, hdx;
    bit sleep;
    hdx = 0;
    for (int j = 0; j < 2; j++)
      for (int k = 0; k < 3; k++) begin
        int s, e;
        e = j * 3 + k;
        s = t - D[j][k] + MS;
        idx[e][0] = s; idx[e][1] = j;
        if (m_app[s][j] < 0) hdx ^= 1;
        v2c[e] = sat(m_app[s][j] - m_c2v[s][j][k], 127);
      end
    m_cnt = (hdx == 0) ? m_cnt + 1 : 0;
    if (m_cnt > int'(P) + 1) m_cnt = P + 1;
    sleep = (m_cnt > int'(P));
    if (sleep) begin n_skip++; return; end
    n_act++;
    sp = 1;
    for (int e = 0; e < 6; e++) begin
      sgn[e] = v2c[e] < 0 ? -1 : 1;
      mag[e] = v2c[e] < 0 ? -v2c[e] : v2c[e];
      sp *= sgn[e];
    end
    for (int e = 0; e < 6; e++) begin
      int m, c;
      m = 1000;
      for (int i = 0; i < 6; i++) if (i != e && mag[i] < m) m = mag[i];
      if (m > 31) m = 31;
      c = sp * sgn[e] * m;
      m_c2v[idx[e][0]][idx[e][1]][e % 3] = c;
      m_app[idx[e][0]][idx[e][1]] = sat(v2c[e] + c, 127);
    end
  endtask

  task automatic step(phase_t p);
    @(negedge clk);
    phase = p;
    @(posedge clk);
  endtask

  initial begin
    phase = PH_IDLE; init_addr = '0; in_slot = '0;
    for (int s = 0; s < MS; s++) begin
      m_app[s][0] = 127; m_app[s][1] = 127;
      for (int j = 0; j < 2; j++) for (int k = 0; k < 3; k++) m_c2v[s][j][k] = 0;
      m_val[s] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a <= int'(MS); a++) begin
      @(negedge clk); phase = PH_INIT; init_addr = a[$bits(init_addr)-1:0];
      @(posedge clk);
    end
    for (int t = 0; t < NT; t++) begin
      bit quiet;
      int tt;
      quiet = ((t / 60) % 2 == 1);   // stretches where every check holds
      tt = t + MS;
      @(negedge clk);
      in_slot.valid = 1'($urandom);
      m_val[tt] = in_slot.valid;
      for (int j = 0; j < 2; j++) begin
        int a;
        a = int'($urandom % 255) - 127;
        if (quiet) a = 20 + int'($urandom % 100);
        in_slot.app[j] = app_t'(a);
        m_app[tt][j] = a;
        for (int k = 0; k < 3; k++) begin
          int c;
          c = int'($urandom % 63) - 31;
          in_slot.c2v[j][k] = llr_t'(c);
          m_c2v[tt][j][k] = c;
        end
      end
      step(PH_WRITE);
      step(PH_READ);
      step(PH_UPDATE);
      step(PH_OUT);
      model_step(t);
      @(negedge clk);
      phase = PH_IDLE;
      // leaving slot: time t - MS
      checks++;
      if (out_slot.valid !== m_val[t]) begin
        failures++;
        $display("FAIL t=%0d valid", t);
      end
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (int'(out_slot.app[j]) != m_app[t][j]) begin
          failures++;
          $display("FAIL t=%0d app[%0d] got %0d exp %0d", t, j, out_slot.app[j], m_app[t][j]);
        end
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (int'(out_slot.c2v[j][k]) != m_c2v[t][j][k]) begin
            failures++;
            $display("FAIL t=%0d c2v[%0d][%0d] got %0d exp %0d", t, j, k,
                     out_slot.c2v[j][k], m_c2v[t][j][k]);
          end
        end
      end
    end
    $display("check node activations %0d, skipped while asleep %0d", n_act, n_skip);
    checks++;
    if (n_skip == 0 || n_act == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hw_act = 0, hw_skip = 0;
  always @(posedge clk) if (rst_n) begin
    if (activated) hw_act++;
    if (skipped) hw_skip++;
  end
  final $display("processor reported %0d activations, %0d skips", hw_act, hw_skip);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
