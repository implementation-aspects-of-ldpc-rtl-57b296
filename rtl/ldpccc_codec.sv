// ldpccc_codec: transmitter and receiver ends of a rate 1/2 (MS, 3, 6) LDPC
// convolutional code link.
//
// Transmit path: information bits enter the partial syndrome former
// encoder (psf_encoder, with its partial syndrome multiplier), which emits
// one systematic code block (u_t, parity) per information bit; the
// serialiser turns the blocks into a channel bit stream, u_t first.
//
// Receive path: channel values (LLRs, positive = bit 0) arrive one per
// symbol; the input buffer gathers the c = 2 values of a block and hands
// the block to the pipeline decoder (ITER processors with on-demand
// variable node activation and the stopping rule). Decided code blocks
// leave on dec_valid / dec_bits after the initial decoding delay of
// ITER * (MS + 1) blocks. Setting the processor separation S below MS + 1
// turns the decoder into the compact decoder (overlapping regions, delay
// (ITER - 1) * S + MS + 1 blocks, MS/2 < S required).
//
// Framed transmission: after the last information bit of a frame a
// `terminate` pulse makes the tail generator capture the encoder state and
// feed the encoder the TAU = 2 (MS + 1) tail bits that bring it back to the
// all-zero state (term_busy high meanwhile, term_done at the end). The
// tail coefficient table is loaded through the coef_* port beforehand.
// While the tail runs, and in the cycle of `terminate`, u_ready is low.
//
// The two paths share only the clock and reset; the channel between them
// is outside this design. The per-processor status vectors give the sleep
// state and the check node activations of each processor, from which the
// average number of iterations actually performed can be measured.
module ldpccc_codec
  import ldpccc_pkg::*;
#(
  parameter int unsigned MS      = 2048,
  parameter int unsigned ITER    = 50,
  parameter int unsigned S       = MS + 1,  // processor separation
  parameter int unsigned P       = MS,
  parameter bit          STOP_EN = 1'b1,
  parameter int unsigned TAU     = 2 * (MS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // information bits in
  input  logic              u_valid,
  input  logic              u,
  output logic              u_ready,
  // channel bits out
  output logic              tx_valid,
  output logic              tx_bit,
  input  logic              tx_ready,
  output logic              enc_state_zero,
  // termination
  input  logic              coef_we,
  input  logic [$clog2(TAU)-1:0] coef_addr,
  input  logic [MS:1]       coef_data,
  input  logic              terminate,
  output logic              term_busy,
  output logic              term_done,
  // channel values in
  input  logic              rx_valid,
  input  llr_t              rx_llr,
  output logic              rx_ready,
  // decided code blocks out
  output logic              dec_valid,
  output logic [C-1:0]      dec_bits,
  output logic              dec_ready,
  output logic [ITER-1:0]   proc_asleep,
  output logic [ITER-1:0]   proc_activated,
  output logic [ITER-1:0]   proc_skipped
);

  logic          enc_u_valid, enc_u, enc_u_ready;
  logic          tg_valid, tg_u;
  logic [MS:1]   enc_state;
  logic          v_valid, v_ready;
  logic [C-1:0]  v;
  logic          blk_valid, blk_ready;
  llr_t [C-1:0]  blk;

  // information bits from the user, or the tail while terminating
  assign enc_u_valid = term_busy ? tg_valid : (u_valid && !terminate);
  assign enc_u       = term_busy ? tg_u : u;
  assign u_ready     = enc_u_ready && !term_busy && !terminate;

  tail_generator #(.MS(MS), .TAU(TAU)) u_tail (
    .clk       (clk),
    .rst_n     (rst_n),
    .coef_we   (coef_we),
    .coef_addr (coef_addr),
    .coef_data (coef_data),
    .start     (terminate),
    .state     (enc_state),
    .busy      (term_busy),
    .done      (term_done),
    .u_valid   (tg_valid),
    .u         (tg_u),
    .u_ready   (enc_u_ready && term_busy)
  );

  psf_encoder #(.MS(MS)) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .u_valid    (enc_u_valid),
    .u          (enc_u),
    .u_ready    (enc_u_ready),
    .v_valid    (v_valid),
    .v          (v),
    .v_ready    (v_ready),
    .state      (enc_state),
    .state_zero (enc_state_zero)
  );

  serialiser #(.C(C)) u_ser (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v_valid),
    .in_bits   (v),
    .in_ready  (v_ready),
    .out_valid (tx_valid),
    .out_bit   (tx_bit),
    .out_ready (tx_ready)
  );

  input_buffer u_ibuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rx_valid),
    .in_llr    (rx_llr),
    .in_ready  (rx_ready),
    .blk_valid (blk_valid),
    .blk       (blk),
    .blk_ready (blk_ready)
  );

  pipeline_decoder #(.MS(MS), .ITER(ITER), .S(S), .P(P), .STOP_EN(STOP_EN)) u_dec (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (blk_valid),
    .in_llr         (blk),
    .in_ready       (blk_ready),
    .out_valid      (dec_valid),
    .out_bits       (dec_bits),
    .ready          (dec_ready),
    .proc_asleep    (proc_asleep),
    .proc_activated (proc_activated),
    .proc_skipped   (proc_skipped)
  );

endmodule
