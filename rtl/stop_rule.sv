// stop_rule: the stopping rule of one pipeline processor. Each time unit
// the processor reports whether the code block that has just entered its
// operating region satisfies the first column of check nodes there
// (`satisfied`, strobed by `eval`). A satisfied check increments the
// processor's counter, an unsatisfied one clears it. While the counter
// exceeds the stopping parameter P the processor sleeps: it skips its
// check node activation and passes the slots through unchanged. The rule
// keeps being evaluated while asleep, and the first unsatisfied check wakes
// the processor for that very time unit.
//
// `sleep` is combinational from the current evaluation (counter value after
// this time unit's update) so the processor can act on it in the same
// time unit; `asleep` is its registered copy. EN = 0 disables the rule
// (processor always active). The counter saturates at P + 1.
module stop_rule #(
  parameter int unsigned P  = 2048,  // stopping parameter (document: P = m_s)
  parameter bit          EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic eval,
  input  logic satisfied,
  output logic sleep,
  output logic asleep,
  output logic [$clog2(P+2)-1:0] count
);

  localparam int unsigned CW = $clog2(P + 2);
  logic [CW-1:0] cnt_next;

  always_comb begin
    if (!satisfied)                 cnt_next = '0;
    else if (count == CW'(P + 1))   cnt_next = count;
    else                            cnt_next = count + 1'b1;
  end

  assign sleep = EN && eval && (cnt_next > CW'(P));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      asleep <= 1'b0;
    end else if (eval) begin
      count  <= cnt_next;
      asleep <= EN && (cnt_next > CW'(P));
    end
  end

endmodule
