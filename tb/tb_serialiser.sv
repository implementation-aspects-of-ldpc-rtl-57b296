// tb_serialiser: sends random 2-bit blocks through the serialiser with
// random gaps at the input and random back-pressure at the output, and
// checks that the bit stream is the blocks in order, low bit first. With
// both sides always ready the output must be one bit per clock.
module tb_serialiser;
  localparam int N = 300;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_bit, out_ready;
  logic [1:0] in_bits;
  logic [1:0] blocks [N];
  int nin = 0, nout = 0, checks = 0, failures = 0;
  int cycle = 0, t_first = 0, t_half = 0;
  bit random_mode = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  serialiser #(.C(2)) dut (.*);

  assign in_bits = blocks[nin % N];

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) nin++;
    if (rst_n && out_valid && out_ready) begin
      if (nout == 0) t_first = cycle;
      if (nout == N - 1) t_half = cycle;
      checks++;
      if (out_bit !== blocks[nout / 2][nout % 2]) begin
        failures++;
        $display("FAIL bit %0d", nout);
      end
      nout++;
    end
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && (nin < N) && (!random_mode || 1'($urandom));
    out_ready <= !random_mode || 1'($urandom);
  end

  initial begin
    for (int i = 0; i < N; i++) blocks[i] = 2'($urandom);
    in_valid = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (nout == N);
    checks++;
    if (t_half - t_first != N - 1) begin
      failures++;
      $display("FAIL rate: %0d bits took %0d cycles", N, t_half - t_first + 1);
    end
    random_mode = 1;
    wait (nout == 2 * N);
    @(posedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
