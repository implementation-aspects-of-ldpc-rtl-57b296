// psf_encoder: systematic partial syndrome former encoder for the rate 1/2
// (MS, 3, 6) LDPC convolutional code of ldpccc_pkg.
//
// The state is the partial syndrome p_t = (p_{t,1} .. p_{t,MS}), held in an
// MS-stage shift register (c - b = 1 bit per stage). For an information bit
// u_t the code block is
//     v_t^(1) = u_t,   v_t^(2) = u_t * H_0^(0) + p_{t,1} = u_t xor p_{t,1}
// and the register then advances by
//     p_{t+1,i}  = p_{t,i+1} xor v_t H_i^T   (i < MS)
//     p_{t+1,MS} = v_t H_MS^T
// where the products come from ps_multiplier. The register is cleared by
// reset (encoder in the zero state). `state` exposes p_t for the tail
// generator of terminated transmission.
//
// Interface: a valid/ready input for u and a valid/ready output for the
// code block v_t, registered; one code block per clock when the consumer is
// always ready. Latency one clock from input handshake to v_valid.
module psf_encoder
  import ldpccc_pkg::*;
#(
  parameter int unsigned MS = 2048   // syndrome former memory m_s
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          u_valid,
  input  logic [B-1:0]  u,
  output logic          u_ready,
  output logic          v_valid,
  output logic [C-1:0]  v,        // v[0] = v_t^(1) (systematic), v[1] = parity
  input  logic          v_ready,
  output logic [MS:1]   state,    // partial syndrome p_t
  output logic          state_zero
);

  logic [MS:1] p;
  logic [C-1:0] v_new;
  logic [MS:1] prod;
  logic accept;

  assign v_new   = {u[0] ^ p[1], u[0]};
  assign u_ready = !v_valid || v_ready;
  assign accept  = u_valid && u_ready;

  ps_multiplier #(.MS(MS)) u_mult (.v(v_new), .prod(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p       <= '0;
      v_valid <= 1'b0;
      v       <= '0;
    end else begin
      if (accept) begin
        for (int i = 1; i < MS; i++) p[i] <= p[i+1] ^ prod[i];
        p[MS]   <= prod[MS];
        v       <= v_new;
        v_valid <= 1'b1;
      end else if (v_ready) begin
        v_valid <= 1'b0;
      end
    end
  end

  assign state      = p;
  assign state_zero = (p == '0);

endmodule
