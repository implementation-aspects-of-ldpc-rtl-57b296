// tail_generator: termination circuit for framed transmission. To end a
// frame of L information blocks the encoder must be driven back to the
// all-zero state by a tail of TAU further blocks. The tail depends only on
// the encoder's partial syndrome p_L at time L and, the map being linear
// over GF(2), each tail information bit is
//     u_{L+n} = XOR over i of p_{L,i} & g_{i,n},   n = 0 .. TAU-1.
// The coefficients g are fixed by the code and computed in advance (they
// come from a right inverse of the tail's syndrome former section); because
// this code is time invariant they do not depend on L, so one coefficient
// table serves every frame length. Feeding these bits to the encoder as
// ordinary information bits reproduces the full tail v_{L+n}, since the
// encoder forms the parity bit itself.
//
// Coefficient table: TAU words of MS bits, word n holding g_{1..MS,n},
// written through coef_we / coef_addr / coef_data (e.g. at start-up).
//
// Operation: a `start` pulse captures p_L from `state` (the encoder must
// not take an information bit in that clock); the unit then offers one
// tail bit per handshake on u_valid / u / u_ready, reading word n of the
// table, and raises `done` for one clock after the last bit is taken.
// The table is read asynchronously; this design's choice.
module tail_generator #(
  parameter int unsigned MS  = 2048,          // syndrome former memory m_s
  parameter int unsigned TAU = 2 * (MS + 1)   // tail length in blocks
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic [$clog2(TAU)-1:0]   coef_addr,
  input  logic [MS:1]              coef_data,
  input  logic                     start,
  input  logic [MS:1]              state,
  output logic                     busy,
  output logic                     done,
  output logic                     u_valid,
  output logic                     u,
  input  logic                     u_ready
);

  localparam int unsigned NW = $clog2(TAU);

  logic [MS:1]   coef [TAU];
  logic [MS:1]   p_l;
  logic [NW-1:0] n;

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_data;
  end

  assign u_valid = busy;
  assign u       = ^(p_l & coef[n]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_l  <= '0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        p_l  <= state;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy && u_ready) begin
        if (n == NW'(TAU - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          n <= n + 1'b1;
        end
      end
    end
  end

endmodule
