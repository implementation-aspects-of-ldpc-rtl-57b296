// tb_input_buffer: streams random channel values, with random gaps, into
// the input buffer while the block consumer takes blocks at random, and
// checks that each block holds two consecutive values in arrival order and
// that no value is lost or duplicated. With both sides always ready one
// block must leave every two values.
module tb_input_buffer;
  import ldpccc_pkg::*;
  localparam int N = 600;   // values
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, blk_valid, blk_ready;
  llr_t in_llr;
  llr_t [C-1:0] blk;
  llr_t vals [N];
  int nin = 0, nblk = 0, checks = 0, failures = 0, stalls = 0;
  bit random_mode = 0;

  always #5 clk = ~clk;

  input_buffer dut (.*);

  assign in_llr = vals[nin % N];

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) nin++;
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && blk_valid && blk_ready) begin
      for (int j = 0; j < C; j++) begin
        checks++;
        if (blk[j] !== vals[2 * nblk + j]) begin
          failures++;
          $display("FAIL block %0d value %0d: %0d vs %0d", nblk, j, blk[j], vals[2*nblk+j]);
        end
      end
      nblk++;
    end
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && (nin < N) && (!random_mode || ($urandom % 4 != 0));
    blk_ready <= !random_mode || ($urandom % 3 == 0);
  end

  initial begin
    int t0;
    for (int i = 0; i < N; i++) vals[i] = llr_t'($urandom);
    in_valid = 0; blk_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    t0 = 0;
    wait (nblk == N / 4);
    checks++;
    if (stalls != 0) begin
      failures++;
      $display("FAIL input stalled with the decoder always ready");
    end
    random_mode = 1;
    wait (nblk == N / 2);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL back-pressure never reached the input");
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
