// tb_ldpccc_codec_full: end-to-end test of the whole link with every parameter at its default (m_s = 2048, I = 50). Random information
// bits go into the encoder; the serialised channel bits are taken with
// random back-pressure, mapped to +-1, given Gaussian noise in the middle
// part of the stream only, quantised to 6-bit LLRs (8 per unit amplitude)
// and fed, with random gaps, into the receive side. The decided code
// blocks are compared with the transmitted ones. The stream is
// N1 noiseless blocks, N2 noisy blocks (sigma = 0.6), N3 noiseless
// blocks, then I * (m_s + 1) further blocks that push the last ones out.
// Termination is exercised by the reduced-size end-to-end test only; a
// tail table for m_s = 2048 is too large to derive in simulation.
// Checks and counted events:
//  - the information bit of every block is passed unchanged by the encoder;
//  - after a termination tail the encoder is in the zero state;
//  - the first decided block leaves in the time unit of received block
//    I * (m_s + 1) (initial decoding delay);
//  - no error in the noiseless parts; the noisy part ends with at most a
//    quarter of the channel's hard-decision errors;
//  - each mechanism happens at least once: transmit back-pressure,
//    receive back-pressure (input buffer full), decoder stall (no block
//    waiting), processors falling asleep and waking up (stopping rule),
//    and channel errors corrected by the decoder.
module tb_ldpccc_codec_full;
  import ldpccc_pkg::*;
  import ldpccc_tb_pkg::*;
  localparam int unsigned MS   = 2048;
  localparam int unsigned ITER = 50;
  localparam int LAT   = ITER * (MS + 1);
  localparam int N1    = 3000;
  localparam int N2    = 6000;
  localparam int N3    = 3000;
  localparam int N     = N1 + N2 + N3;
  localparam int NTOT  = N + LAT;
  localparam real SIGMA = 0.6;
  localparam int unsigned TAU = 2 * (MS + 1);
  localparam bit TERM    = 0;   // terminate one frame
  localparam int TERM_AT = N1 / 2;   // after this many information bits
  typedef ldpccc_tb_pkg::code_model #(MS, TAU, 683, 2048, 410, 1537) model_t;

  logic clk = 0, rst_n = 0;
  logic u_valid, u, u_ready, tx_valid, tx_bit, tx_ready, enc_state_zero;
  logic rx_valid, rx_ready, dec_valid, dec_ready;
  llr_t rx_llr;
  logic [C-1:0] dec_bits;
  logic [ITER-1:0] proc_asleep, proc_activated, proc_skipped;
  logic coef_we, terminate, term_busy, term_done;
  logic [$clog2(TAU)-1:0] coef_addr;
  logic [MS:1] coef_data;
  bit   [MS:1] g [TAU];
  bit   ein [NTOT + TAU];   // bits taken by the encoder (information or tail)
  int   nenc = 0, terminations = 0;
  bit   hold = 0;

  bit   info [NTOT];
  bit   txb  [NTOT][2];
  bit   hard [NTOT][2];
  llr_t q [$];
  int   nu = 0, ntx = 0, nrx = 0, nout = 0, checks = 0, failures = 0;
  int   raw_err = 0, dec_err = 0, quiet_err = 0, corrected = 0;
  int   tx_bp = 0, rx_bp = 0, dec_stall = 0;
  int   n_act = 0, n_skip = 0, sleep_entries = 0, wakeups = 0;
  logic [ITER-1:0] prev_asleep = '0;
  int   ntaken = 0;   // blocks taken by the decoder
  bit   acc_prev = 0; // a block was taken at the previous clock edge

  always #5 clk = ~clk;

  ldpccc_codec dut (.*);

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial for (int t = 0; t < NTOT; t++) info[t] = 1'($urandom);

  // information source
  assign u_valid = rst_n && !hold && (nu < NTOT);
  assign u       = info[nu % NTOT];

  // channel
  always @(negedge clk) begin
    tx_ready <= ($urandom % 4 != 0);
    rx_valid <= (q.size() > 0) && ($urandom % 8 != 0);
  end
  assign rx_llr = (q.size() > 0) ? q[0] : '0;

  always @(posedge clk) if (rst_n) begin
    if (u_valid && u_ready) nu++;
    if (dut.enc_u_valid && dut.enc_u_ready) begin
      ein[nenc] = dut.enc_u;
      nenc++;
    end
    if (tx_valid && !tx_ready) tx_bp++;
    if (tx_valid && tx_ready) begin
      int t, j, lq;
      real y;
      t = ntx / 2; j = ntx % 2;
      txb[t][j] = tx_bit;
      if (j == 0) begin
        checks++;
        if (tx_bit != ein[t]) begin
          failures++;
          $display("FAIL block %0d: systematic bit changed", t);
        end
      end
      y = tx_bit ? -1.0 : 1.0;
      if (t >= N1 && t < N1 + N2) y += SIGMA * gauss();
      lq = $rtoi(y * 8.0 + (y >= 0 ? 0.5 : -0.5));
      if (lq > 31) lq = 31;
      if (lq < -31) lq = -31;
      hard[t][j] = (lq < 0);
      if (t < N && hard[t][j] != tx_bit) raw_err++;
      q.push_back(llr_t'(lq));
      ntx++;
    end
    if (rx_valid && !rx_ready) rx_bp++;
    if (rx_valid && rx_ready) begin
      void'(q.pop_front());
      nrx++;
    end
    if (dut.u_dec.ph == PH_IDLE && dec_ready) dec_stall++;
    for (int i = 0; i < ITER; i++) begin
      if (proc_activated[i]) n_act++;
      if (proc_skipped[i]) n_skip++;
      if (proc_asleep[i] && !prev_asleep[i]) sleep_entries++;
      if (!proc_asleep[i] && prev_asleep[i]) wakeups++;
    end
    prev_asleep <= proc_asleep;
    if (dec_valid) begin
      if (nout == 0) begin
        // the decided block leaves one clock after the end of its time
        // unit, at the edge where the next block may already be taken
        checks++;
        if (ntaken - int'(acc_prev) != LAT) begin
          failures++;
          $display("FAIL first decided block in time unit %0d, expected %0d",
                   ntaken - int'(acc_prev), LAT);
        end
      end
      for (int j = 0; j < 2; j++) begin
        if (dec_bits[j] != txb[nout][j]) begin
          if (nout >= N1 && nout < N1 + N2) dec_err++;
          else if (nout < N) quiet_err++;
        end else if (hard[nout][j] != txb[nout][j]) begin
          corrected++;
        end
      end
      nout++;
    end
    acc_prev = dut.blk_valid && dut.blk_ready;
    if (acc_prev) ntaken++;
  end

  initial begin
    coef_we = 0; coef_addr = '0; coef_data = '0; terminate = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    if (TERM) begin
      int rank;
      model_t::tail_coef(g, rank);
      checks++;
      if (rank != int'(MS)) failures++;
      for (int n = 0; n < int'(TAU); n++) begin
        @(negedge clk);
        coef_we = 1; coef_addr = n[$bits(coef_addr)-1:0]; coef_data = g[n];
      end
      @(negedge clk);
      coef_we = 0;
      wait (nu == TERM_AT);
      hold = 1;
      @(negedge clk);
      terminate = 1;
      @(negedge clk);
      terminate = 0;
      wait (term_done);
      @(posedge clk); @(posedge clk);
      terminations++;
      checks++;
      if (!enc_state_zero) begin
        failures++;
        $display("FAIL encoder not in the zero state after the tail");
      end
      hold = 0;
    end
  end

  initial begin
    wait (nout == N);
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
    $display("channel bit errors %0d, decoded bit errors %0d, corrected %0d (of %0d noisy bits)",
             raw_err, dec_err, corrected, 2 * N2);
    $display("transmit back-pressure %0d, receive back-pressure %0d, decoder stall cycles %0d",
             tx_bp, rx_bp, dec_stall);
    $display("check node activations %0d, skipped %0d, sleep entries %0d, wake-ups %0d",
             n_act, n_skip, sleep_entries, wakeups);
    $display("average iterations per block %0.2f of %0d",
             real'(n_act) / real'(n_act + n_skip) * ITER, ITER);
    checks++; if (tx_bp == 0)         begin failures++; $display("FAIL no transmit back-pressure"); end
    checks++; if (rx_bp == 0)         begin failures++; $display("FAIL no receive back-pressure"); end
    checks++; if (dec_stall == 0)     begin failures++; $display("FAIL no decoder stall"); end
    checks++; if (sleep_entries == 0) begin failures++; $display("FAIL no processor slept"); end
    checks++; if (wakeups == 0)       begin failures++; $display("FAIL no processor woke up"); end
    checks++; if (corrected == 0)     begin failures++; $display("FAIL no channel error corrected"); end
    if (TERM) begin
      checks++; if (terminations == 0) begin failures++; $display("FAIL no frame terminated"); end
    end
    $display("terminated frames %0d", terminations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
