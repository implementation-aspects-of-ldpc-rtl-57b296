// tb_stop_rule: drives the stopping rule with P = 5 and a random sequence
// of satisfied / unsatisfied checks (long satisfied runs included) and
// compares sleep and asleep with a counter model: counter + 1 on a
// satisfied check, 0 on an unsatisfied one, sleep while counter > P.
// Also checks that EN = 0 never sleeps.
module tb_stop_rule;
  localparam int unsigned P = 5;
  logic clk = 0, rst_n = 0;
  logic eval, satisfied, sleep, asleep, sleep_off, asleep_off;
  logic [$clog2(P+2)-1:0] count, count_off;
  int checks = 0, failures = 0, model = 0, sleeps = 0, wakes = 0;
  bit prev_sleep = 0;

  always #5 clk = ~clk;

  stop_rule #(.P(P), .EN(1'b1)) dut (.*);
  stop_rule #(.P(P), .EN(1'b0)) dut_off (.clk, .rst_n, .eval, .satisfied,
    .sleep(sleep_off), .asleep(asleep_off), .count(count_off));

  initial begin
    eval = 0; satisfied = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      eval = ($urandom % 4 != 0);
      satisfied = ($urandom % 12 != 0);
      #1;
      if (eval) begin
        int next;
        next = satisfied ? model + 1 : 0;
        checks++;
        if (sleep !== (next > int'(P))) begin
          failures++;
          $display("FAIL n=%0d sleep=%b model=%0d", n, sleep, next);
        end
        if (next > int'(P) && !prev_sleep) sleeps++;
        if (next <= int'(P) && prev_sleep) wakes++;
        prev_sleep = (next > int'(P));
        model = next;
      end else begin
        checks++;
        if (sleep !== 1'b0) failures++;
      end
      checks++;
      if (sleep_off !== 1'b0) failures++;
      @(posedge clk); #1;
      checks++;
      if (asleep !== prev_sleep) begin
        failures++;
        $display("FAIL n=%0d asleep=%b", n, asleep);
      end
    end
    checks++;
    if (sleeps == 0 || wakes == 0) failures++;
    $display("sleep entries %0d, wake-ups %0d", sleeps, wakes);
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
