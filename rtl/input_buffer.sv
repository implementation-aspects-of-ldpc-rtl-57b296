// input_buffer: gathers the channel values of one code block. Received
// values arrive one per symbol period; the pipeline decoder loads all c
// values of a block at once, so the first c - 1 of them wait here. When the
// c-th value arrives the complete block is offered to the decoder and held
// until it is taken; meanwhile the next block's values keep filling a second
// register so the channel is not stalled unless the decoder falls behind by
// a whole block.
//
// Interface: valid/ready symbol input, valid/ready block output
// (blk[j] = value of code bit v^(j+1)).
module input_buffer
  import ldpccc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  llr_t          in_llr,
  output logic          in_ready,
  output logic          blk_valid,
  output llr_t [C-1:0]  blk,
  input  logic          blk_ready
);

  llr_t [C-1:0] fill;
  logic [$clog2(C)-1:0] cnt;
  logic complete;

  // The filling register may take a value unless its last slot would
  // complete a block while the output register is still occupied.
  assign complete = (cnt == $bits(cnt)'(C - 1));
  assign in_ready = !(complete && blk_valid && !blk_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      cnt       <= '0;
      blk       <= '0;
      blk_valid <= 1'b0;
    end else begin
      if (blk_valid && blk_ready) blk_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (complete) begin
          blk <= fill;
          blk[C-1] <= in_llr;
          blk_valid <= 1'b1;
          cnt <= '0;
        end else begin
          fill[cnt] <= in_llr;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
