// pipeline_decoder: continuous sliding-window decoder for the LDPC
// convolutional code of ldpccc_pkg. ITER identical processors
// (ldpccc_processor) are chained; each performs one decoding iteration on
// its operating region of MS + 1 time slots, so the ITER iterations run
// simultaneously on different parts of the Tanner graph.
//
// Processor separation. With the default S = MS + 1 the regions do not
// overlap and the window spans ITER * (MS + 1) code blocks. With
// MS/2 < S <= MS (compact decoder) neighbouring regions overlap by
// MS + 1 - S slots, the window shrinks to (ITER - 1) * S + MS + 1 blocks,
// and so do the memory and the initial decoding delay; messages that the
// previous iteration has not finished with are then used, a small loss in
// error rate traded for almost half the memory when S is near MS/2.
//
// Flow. Every received code block (c channel values) starts one time unit.
// The block enters segment 0 with APP = channel value and zero messages;
// the slot leaving segment i enters segment i + 1 in the next time unit;
// the slot leaving the last segment is decided by the sign of its APP
// values. The initial decoding delay is therefore LAT = (ITER - 1) * S +
// MS + 1 time units (ITER * (MS + 1) by default): the block accepted in
// time unit n is decided in time unit n + LAT - 1, and from then on one
// decided block leaves per received block.
//
// Controller. After reset it sweeps the region addresses for MS + 1 clocks
// (PH_INIT) to load the all-zero starting state. A time unit then takes
// four clocks (PH_WRITE, PH_READ, PH_UPDATE, PH_OUT), broadcast to all
// processors; with overlapping regions two more (PH_READ2, PH_UPDATE2)
// let the odd processors update after the even ones. `in_ready` is high in
// PH_IDLE and PH_OUT, so a steady input gives one block every four (six)
// clocks; when no block is waiting the whole
// pipeline holds (a stall) - the code's time axis only advances with data.
// `out_valid` pulses for one clock per decided block that carried received
// data; the consumer cannot stall it.
//
// Document: the pipeline of I processors, the region size m_s + 1, the
// separation S, the initial delay, the on-demand schedule and the stopping
// rule. This
// design's own: the controller, the time-unit steps and the interfaces.
module pipeline_decoder
  import ldpccc_pkg::*;
#(
  parameter int unsigned MS      = 2048,  // syndrome former memory m_s
  parameter int unsigned ITER    = 50,    // iterations = processors I
  parameter int unsigned S       = MS + 1,// processor separation
  parameter int unsigned P       = MS,    // stopping parameter
  parameter bit          STOP_EN = 1'b1   // stopping rule enabled
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  llr_t [C-1:0]      in_llr,       // channel values of one block
  output logic              in_ready,
  output logic              out_valid,
  output logic [C-1:0]      out_bits,     // decided code bits v^(1), v^(2)
  output logic              ready,        // initialisation finished
  output logic [ITER-1:0]   proc_asleep,
  output logic [ITER-1:0]   proc_activated,
  output logic [ITER-1:0]   proc_skipped
);

  localparam int unsigned M       = MS + 1;
  localparam int unsigned AW      = $clog2(M);
  localparam bit          OVERLAP = (S <= MS);

  if (2 * S <= MS || S > MS + 1) begin : g_bad_s
    $error("processor separation S must satisfy MS/2 < S <= MS + 1");
  end

  phase_t        ph;
  logic [AW-1:0] init_addr;
  slot_t         in_q;
  logic          accept;
  logic          out_strobe;
  slot_t         chain [ITER+1];
  edge_req_t [C-1:0][J-1:0] req_chain [ITER+1];
  edge_rsp_t [C-1:0][J-1:0] rsp_chain [ITER+1];

  assign in_ready = (ph == PH_IDLE) || (ph == PH_OUT);
  assign accept   = in_valid && in_ready;
  assign ready    = (ph != PH_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= PH_INIT;
      init_addr  <= '0;
      in_q       <= zero_slot();
      out_strobe <= 1'b0;
    end else begin
      out_strobe <= (ph == PH_OUT);
      unique case (ph)
        PH_INIT: begin
          init_addr <= init_addr + 1'b1;
          if (init_addr == AW'(M - 1)) ph <= PH_IDLE;
        end
        PH_WRITE:  ph <= PH_READ;
        PH_READ:   ph <= PH_UPDATE;
        PH_UPDATE: ph <= OVERLAP ? PH_READ2 : PH_OUT;
        PH_READ2:  ph <= PH_UPDATE2;
        PH_UPDATE2: ph <= PH_OUT;
        PH_IDLE, PH_OUT: ph <= accept ? PH_WRITE : PH_IDLE;
        default:   ph <= PH_IDLE;
      endcase
      if (accept) begin
        in_q.valid <= 1'b1;
        for (int j = 0; j < C; j++) begin
          in_q.app[j] <= app_t'(in_llr[j]);
          for (int k = 0; k < J; k++) in_q.c2v[j][k] <= '0;
        end
      end
    end
  end

  assign chain[0]        = in_q;
  assign req_chain[0]    = '0;
  assign rsp_chain[ITER] = '0;

  for (genvar i = 0; i < ITER; i++) begin : g_proc
    ldpccc_processor #(
      .MS(MS), .S(S), .LAST(i == ITER - 1), .ODD(i % 2 == 1),
      .P(P), .STOP_EN(STOP_EN)
    ) u_proc (
      .clk       (clk),
      .rst_n     (rst_n),
      .phase     (ph),
      .init_addr (init_addr),
      .in_slot   (chain[i]),
      .out_slot  (chain[i+1]),
      .rem_req_o (req_chain[i+1]),
      .rem_rsp_i (rsp_chain[i+1]),
      .rem_req_i (req_chain[i]),
      .rem_rsp_o (rsp_chain[i]),
      .asleep    (proc_asleep[i]),
      .activated (proc_activated[i]),
      .skipped   (proc_skipped[i])
    );
  end

  assign out_valid = out_strobe && chain[ITER].valid;
  for (genvar j = 0; j < C; j++) begin : g_dec
    assign out_bits[j] = chain[ITER].app[j][APP_W-1];
  end

endmodule
