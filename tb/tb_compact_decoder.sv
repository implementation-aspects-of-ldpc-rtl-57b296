// tb_compact_decoder: the pipeline decoder as a compact decoder, with
// m_s = 32, I = 6 processors and processor separation S = 20, so that
// neighbouring operating regions overlap by m_s + 1 - S = 13 time units
// and the window shrinks from I (m_s + 1) = 198 to (I - 1) S + m_s + 1 =
// 133 blocks. The stimulus and the reference encoder are those of
// tb_pipeline_decoder (m_s = 32 code, noiseless / noisy / noiseless parts,
// random input gaps in the noisy part). Checks:
//  - the first decided block leaves in the time unit of input block
//    (I - 1) S + m_s + 1 (initial decoding delay of the compact decoder);
//  - with a steady input one block is taken every 6 clocks (the odd
//    processors update in two extra steps);
//  - every decided block of a noiseless part is error free, and the noisy
//    part ends with far fewer errors than the channel's hard decisions;
//  - edges in the next processor's segment are really used (remote
//    accesses seen), and processors sleep and wake.
module tb_compact_decoder;
  import ldpccc_pkg::*;
  localparam int unsigned MS   = 32;
  localparam int unsigned ITER = 6;
  localparam int unsigned S = 20;
  localparam int LAT   = (ITER - 1) * S + MS + 1;
  localparam int N1    = 300;          // noiseless
  localparam int N2    = 1200;         // noisy
  localparam int N3    = 300;          // noiseless
  localparam int N     = N1 + N2 + N3;
  localparam int NTOT  = N + LAT;
  localparam real SIGMA = 0.6;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, ready;
  llr_t [C-1:0] in_llr;
  logic [C-1:0] out_bits;
  logic [ITER-1:0] proc_asleep, proc_activated, proc_skipped;

  bit   cw [NTOT][2];
  llr_t rx [NTOT][2];
  int   nin = 0, nout = 0, checks = 0, failures = 0;
  int   raw_err = 0, dec_err = 0, quiet_err = 0, stalls = 0;
  int   n_act = 0, n_skip = 0, sleep_entries = 0, wakeups = 0;
  int   cycle = 0, acc_cycle [4];
  bit   gaps = 0;
  bit   acc_prev = 0;   // a block was taken at the previous clock edge
  logic [ITER-1:0] prev_asleep = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  pipeline_decoder #(.MS(MS), .ITER(ITER), .S(S), .P(MS), .STOP_EN(1'b1)) dut (.*);

  int n_remote = 0;
  always @(posedge clk) if (rst_n && dut.req_chain[1] != '0) n_remote++;

  function automatic bit sym(int t, int j);
    return (t < 0) ? 1'b0 : cw[t][j];
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    for (int t = 0; t < NTOT; t++) begin
      cw[t][0] = 1'($urandom);
      cw[t][1] = cw[t][0] ^ sym(t-11, 0) ^ sym(t-32, 0) ^ sym(t-7, 1) ^ sym(t-25, 1);
      for (int j = 0; j < 2; j++) begin
        real y;
        int q;
        y = cw[t][j] ? -1.0 : 1.0;
        if (t >= N1 && t < N1 + N2) y += SIGMA * gauss();
        q = $rtoi(y * 8.0 + (y >= 0 ? 0.5 : -0.5));
        if (q > 31) q = 31;
        if (q < -31) q = -31;
        rx[t][j] = llr_t'(q);
        if (t < N && ((q < 0) != cw[t][j])) raw_err++;
      end
    end
  end

  assign in_llr = {rx[nin % NTOT][1], rx[nin % NTOT][0]};

  always @(negedge clk)
    in_valid <= rst_n && ready && (nin < NTOT) && (!gaps || ($urandom % 3 != 0));

  always @(posedge clk) if (rst_n) begin
    if (out_valid && nout == 0) begin
      // the decided block leaves one clock after the end of its time unit,
      // at the edge where the next block may already have been taken
      checks++;
      if (nin - int'(acc_prev) != LAT) begin
        failures++;
        $display("FAIL first output in time unit of block %0d, expected %0d",
                 nin - int'(acc_prev), LAT);
      end
    end
    acc_prev = in_valid && in_ready;
    if (in_valid && in_ready) begin
      if (nin < 4) acc_cycle[nin] = cycle;
      nin++;
    end
    if (ready && !in_valid && nin < NTOT) stalls++;
    for (int i = 0; i < ITER; i++) begin
      if (proc_activated[i]) n_act++;
      if (proc_skipped[i]) n_skip++;
      if (proc_asleep[i] && !prev_asleep[i]) sleep_entries++;
      if (!proc_asleep[i] && prev_asleep[i]) wakeups++;
    end
    prev_asleep <= proc_asleep;
    if (out_valid) begin
      for (int j = 0; j < 2; j++) begin
        if (out_bits[j] != cw[nout][j]) begin
          if (nout >= N1 && nout < N1 + N2) dec_err++;
          else if (nout < N) quiet_err++;
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nin == N1);
    gaps = 1;
    wait (nin == N1 + N2);
    gaps = 0;
    wait (nout == N);
    checks++;
    if (acc_cycle[3] - acc_cycle[1] != 12) begin
      failures++;
      $display("FAIL steady input not taken every 6 clocks");
    end
    checks++;
    if (n_remote == 0) begin
      failures++;
      $display("FAIL no access to the next processor's segment");
    end
    checks++;
    if (quiet_err != 0) begin
      failures++;
      $display("FAIL %0d errors in noiseless blocks", quiet_err);
    end
    checks++;
    if (dec_err * 4 > raw_err || raw_err == 0) begin
      failures++;
      $display("FAIL noisy part: %0d channel errors, %0d after decoding", raw_err, dec_err);
    end
    checks++;
    if (sleep_entries == 0 || wakeups == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL stopping rule never slept or never woke");
    end
    checks++;
    if (stalls == 0) failures++;
    $display("channel bit errors %0d, decoded bit errors %0d (of %0d noisy bits)",
             raw_err, dec_err, 2 * N2);
    $display("check node activations %0d, skipped %0d, sleep entries %0d, wake-ups %0d, stall cycles %0d",
             n_act, n_skip, sleep_entries, wakeups, stalls);
    $display("average iterations per block %0.2f of %0d",
             real'(n_act) / real'(n_act + n_skip) * ITER, ITER);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
