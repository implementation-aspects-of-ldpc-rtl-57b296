// serialiser: turns each c-bit code block v_t into c consecutive channel
// bits, v_t^(1) first. It takes a block when it is empty or sending the last
// bit of the previous one, so a stream of blocks leaves as an unbroken bit
// stream of one bit per clock.
//
// Interface: valid/ready block input, valid/ready bit output. A block is
// accepted the cycle its handshake completes; its first bit is offered the
// next cycle.
module serialiser #(
  parameter int unsigned C = 2   // bits per code block
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [C-1:0]  in_bits,
  output logic          in_ready,
  output logic          out_valid,
  output logic          out_bit,
  input  logic          out_ready
);

  logic [C-1:0] sh;
  logic [$clog2(C+1)-1:0] left;   // bits still to send
  logic last;

  assign last      = (left == 1) && out_ready;
  assign in_ready  = (left == 0) || last;
  assign out_valid = (left != 0);
  assign out_bit   = sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (in_valid && in_ready) begin
      sh   <= in_bits;
      left <= C[$bits(left)-1:0];
    end else if (out_valid && out_ready) begin
      sh   <= sh >> 1;
      left <= left - 1'b1;
    end
  end

endmodule
