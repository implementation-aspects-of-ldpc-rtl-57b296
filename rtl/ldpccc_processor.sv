// ldpccc_processor: one processor of the pipeline decoder together with
// the part of the decoding window it owns. It performs one decoding
// iteration: every time unit it activates the check node that has just
// entered its operating region, an m_s + 1 time-unit span of the window.
//
// Window segments. The window is split into segments, one per processor,
// that the slots pass through in order. A segment holds LEN consecutive
// time slots in a circular buffer (slot of window offset x, counted from
// the segment's newest slot, at address (ptr - x) mod LEN). With the
// standard processor separation S = MS + 1 every segment is a whole
// operating region. With a smaller separation (the compact decoder,
// MS/2 < S <= MS) a segment holds only S slots, except the last one which
// holds MS + 1, and an operating region reaches into the next segment: an
// edge whose check offset d is at least S lies at offset d - S of the next
// processor's segment. Such remote edges are reached over the rem_req /
// rem_rsp ports; because the offsets are constants, each message array of
// a segment serves either its own processor's edge or the previous
// processor's, and only APP arrays are shared, at different clocks.
// A last processor (LAST = 1, the default) or one with S = MS + 1 has no
// edges in a further segment, so the enables of rem_req_o are then
// constant zero.
//
// Storage per segment: per symbol an APP value and the J check-to-variable
// messages of its edges, (J + 1) words per symbol; one APP array per symbol
// position j (J read and J write ports, one per edge class k) and one
// message array per edge (j, k); one valid bit per slot. Each memory is a
// one-dimensional array in its own generate block so that synthesis sees
// it as a RAM.
//
// One time unit, stepped by the decoder controller through `phase`:
//   PH_WRITE   the slot leaving the previous segment (or the channel) is
//              written at the newest address.
//   PH_READ    the K = 6 edges of the newest check node are read (local
//              edges here, remote edges in the next segment).
//   PH_UPDATE  the stopping rule judges the hard decisions (APP signs) of
//              the six symbols; unless the processor sleeps, each symbol's
//              variable-to-check message is formed on demand (vnu), the
//              check node is activated (cnu), and the new messages and APP
//              values are written back. They are visible to the next check
//              nodes of the same iteration (on-demand schedule).
//   PH_OUT     the oldest slot of the segment is read into `out_slot`.
// When regions overlap (S <= MS), processors with ODD = 1 read and update
// in PH_READ2 / PH_UPDATE2 instead, so two processors never update the
// shared symbols in the same clock. After reset the controller runs PH_INIT
// for MS + 1 clocks with `init_addr` sweeping the addresses to load
// known-zero slots (the encoder's all-zero start state).
//
// From the document: the processor's region and schedule, the on-demand
// activation, the stopping rule and the separation S. This design's
// choices: the segment memory organisation, the remote edge ports, the
// time-unit steps and the initial sweep.
module ldpccc_processor
  import ldpccc_pkg::*;
#(
  parameter int unsigned MS      = 2048,    // syndrome former memory m_s
  parameter int unsigned S       = MS + 1,  // processor separation
  parameter bit          LAST    = 1'b1,    // last processor (segment MS + 1)
  parameter bit          ODD     = 1'b0,    // odd position in the chain
  parameter int unsigned P       = MS,      // stopping parameter
  parameter bit          STOP_EN = 1'b1     // stopping rule enabled
) (
  input  logic          clk,
  input  logic          rst_n,
  input  phase_t        phase,
  input  logic [$clog2(MS+1)-1:0] init_addr,
  input  slot_t         in_slot,
  output slot_t         out_slot,
  // edges of this processor that lie in the next segment
  output edge_req_t [C-1:0][J-1:0] rem_req_o,
  input  edge_rsp_t [C-1:0][J-1:0] rem_rsp_i,
  // edges of the previous processor that lie in this segment
  input  edge_req_t [C-1:0][J-1:0] rem_req_i,
  output edge_rsp_t [C-1:0][J-1:0] rem_rsp_o,
  output logic          asleep,     // stopping rule state after last update
  output logic          activated,  // pulse: a check node was activated
  output logic          skipped     // pulse: a check node was skipped
);

  localparam int unsigned LEN     = LAST ? MS + 1 : S;
  localparam int unsigned AW      = $clog2(MS + 1);
  localparam bit          OVERLAP = (S <= MS);
  localparam phase_t      MY_READ = (OVERLAP && ODD) ? PH_READ2 : PH_READ;
  localparam phase_t      MY_UPD  = (OVERLAP && ODD) ? PH_UPDATE2 : PH_UPDATE;

  // An edge is local when its symbol lies in this segment.
  function automatic bit is_local(int unsigned j, int unsigned k);
    return LAST || (sym_delay(MS, j, k) < S);
  endfunction

  // address of window offset x of this segment
  function automatic logic [AW-1:0] seg_addr(logic [AW-1:0] p, int unsigned x);
    return (int'(p) >= int'(x)) ? AW'(int'(p) - int'(x))
                                : AW'(int'(p) + int'(LEN) - int'(x));
  endfunction

  logic [AW-1:0] ptr;    // address of the newest slot of the segment

  // ------------------------------------------------- memory port requests
  // Port (j, k) serves this processor's local edge (j, k) in its own
  // read/update steps, and the previous processor's remote edge (j, k)
  // when that processor asks for it.
  logic          own_rd, own_upd;
  logic          sleep;
  logic          pt_re  [C][J];
  logic          pt_we  [C][J];
  logic [AW-1:0] pt_addr [C][J];
  app_t          pt_wapp [C][J];
  llr_t          pt_wc2v [C][J];
  app_t          pt_rapp [C][J];   // port read registers
  llr_t          pt_rc2v [C][J];

  app_t [K-1:0]  v2c;
  llr_t [K-1:0]  c2v_new;
  app_t          app_new [C][J];
  app_t          e_app [C][J];      // edge read data, local or remote
  llr_t          e_c2v [C][J];
  logic [K-1:0]  hd;

  assign own_rd  = (phase == MY_READ);
  assign own_upd = (phase == MY_UPD);

  always_comb begin
    for (int j = 0; j < C; j++)
      for (int k = 0; k < J; k++) begin
        int unsigned d;
        d = sym_delay(MS, j, k);
        if (is_local(j, k) && (own_rd || own_upd)) begin
          pt_re[j][k]   = own_rd;
          pt_we[j][k]   = own_upd && !sleep;
          pt_addr[j][k] = seg_addr(ptr, d);
          pt_wapp[j][k] = app_new[j][k];
          pt_wc2v[j][k] = c2v_new[j*J+k];
        end else begin
          pt_re[j][k]   = rem_req_i[j][k].re;
          pt_we[j][k]   = rem_req_i[j][k].we;
          pt_addr[j][k] = seg_addr(ptr, (d >= S) ? d - S : 0);
          pt_wapp[j][k] = rem_req_i[j][k].app;
          pt_wc2v[j][k] = rem_req_i[j][k].c2v;
        end
        rem_rsp_o[j][k].app = pt_rapp[j][k];
        rem_rsp_o[j][k].c2v = pt_rc2v[j][k];
        // this processor's requests for edges in the next segment
        rem_req_o[j][k].re  = !is_local(j, k) && own_rd;
        rem_req_o[j][k].we  = !is_local(j, k) && own_upd && !sleep;
        rem_req_o[j][k].app = app_new[j][k];
        rem_req_o[j][k].c2v = c2v_new[j*J+k];
        e_app[j][k] = is_local(j, k) ? pt_rapp[j][k] : rem_rsp_i[j][k].app;
        e_c2v[j][k] = is_local(j, k) ? pt_rc2v[j][k] : rem_rsp_i[j][k].c2v;
      end
  end

  // ------------------------------------------------------------ datapath
  for (genvar j = 0; j < C; j++) begin : g_sym
    for (genvar k = 0; k < J; k++) begin : g_edge
      vnu u_vnu (
        .app     (e_app[j][k]),
        .c2v_old (e_c2v[j][k]),
        .c2v_new (c2v_new[j*J+k]),
        .v2c     (v2c[j*J+k]),
        .app_new (app_new[j][k])
      );
      assign hd[j*J+k] = e_app[j][k][APP_W-1];
    end
  end

  cnu u_cnu (.v2c(v2c), .c2v(c2v_new));

  stop_rule #(.P(P), .EN(STOP_EN)) u_stop (
    .clk       (clk),
    .rst_n     (rst_n),
    .eval      (own_upd),
    .satisfied (^hd == 1'b0),
    .sleep     (sleep),
    .asleep    (asleep),
    .count     ()
  );

  assign activated = own_upd && !sleep;
  assign skipped   = own_upd && sleep;

  // -------------------------------------------------------------- memory
  // The three APP ports of one position j always address different slots:
  // the offsets sym_delay(MS, j, k) differ, and a local and a remote user
  // of the same array never act in the same clock.
  logic [AW-1:0] wr_init;             // initialisation address in the segment
  logic [AW-1:0] old_addr;            // oldest slot of the segment
  app_t          out_app [C];
  llr_t          out_c2v [C][J];
  logic          out_val;
  logic          out_ok;              // out_* hold a slot read in PH_OUT

  assign wr_init  = AW'(int'(init_addr) % int'(LEN));
  assign old_addr = seg_addr(ptr, LEN - 1);

  for (genvar j = 0; j < C; j++) begin : g_app
    app_t mem [LEN];
    app_t rd [J];
    app_t rd_out;

    always_ff @(posedge clk) begin
      if (phase == PH_INIT) mem[wr_init] <= app_t'(APP_MAX);
      else if (phase == PH_WRITE) mem[ptr] <= in_slot.app[j];
      else
        for (int k = 0; k < J; k++)
          if (pt_we[j][k]) mem[pt_addr[j][k]] <= pt_wapp[j][k];
    end

    always_ff @(posedge clk) begin
      for (int k = 0; k < J; k++)
        if (pt_re[j][k]) rd[k] <= mem[pt_addr[j][k]];
      if (phase == PH_OUT) rd_out <= mem[old_addr];
    end

    for (genvar k = 0; k < J; k++) begin : g_rd
      assign pt_rapp[j][k] = rd[k];
    end
    assign out_app[j] = rd_out;

    for (genvar k = 0; k < J; k++) begin : g_c2v
      llr_t cmem [LEN];
      llr_t crd, crd_out;

      always_ff @(posedge clk) begin
        if (phase == PH_INIT) cmem[wr_init] <= '0;
        else if (phase == PH_WRITE) cmem[ptr] <= in_slot.c2v[j][k];
        else if (pt_we[j][k]) cmem[pt_addr[j][k]] <= pt_wc2v[j][k];
      end

      always_ff @(posedge clk) begin
        if (pt_re[j][k]) crd <= cmem[pt_addr[j][k]];
        if (phase == PH_OUT) crd_out <= cmem[old_addr];
      end

      assign pt_rc2v[j][k] = crd;
      assign out_c2v[j][k] = crd_out;
    end
  end

  logic val_mem [LEN];

  always_ff @(posedge clk) begin
    if (phase == PH_INIT) val_mem[wr_init] <= 1'b0;
    else if (phase == PH_WRITE) val_mem[ptr] <= in_slot.valid;
  end

  always_ff @(posedge clk) begin
    if (phase == PH_OUT) out_val <= val_mem[old_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      out_ok <= 1'b0;
    end else if (phase == PH_OUT) begin
      ptr    <= (ptr == AW'(LEN - 1)) ? '0 : ptr + 1'b1;
      out_ok <= 1'b1;
    end
  end

  // Until the first PH_OUT the output is the zero slot.
  always_comb begin
    out_slot = zero_slot();
    if (out_ok) begin
      out_slot.valid = out_val;
      for (int j = 0; j < C; j++) begin
        out_slot.app[j] = out_app[j];
        for (int k = 0; k < J; k++) out_slot.c2v[j][k] = out_c2v[j][k];
      end
    end
  end

endmodule
