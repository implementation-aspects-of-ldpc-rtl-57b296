// ldpccc_pkg: types and constants shared by the encoder and the pipeline
// decoder of a rate R = b/c = 1/2, regular (m_s, J, K) = (m_s, 3, 6) LDPC
// convolutional code.
//
// The code. At every time unit t the encoder emits one code block
// v_t = (v_t^(1), v_t^(2)): the information bit u_t and one parity bit.
// There is one check node per time unit (c - b = 1). The check at time t
// sums the six symbols
//     v_t^(1), v_{t-A1}^(1), v_{t-MS}^(1), v_t^(2), v_{t-B1}^(2), v_{t-B2}^(2)
// so every symbol lies in J = 3 checks and every check holds K = 6 symbols.
// H_0 = [1 1]: its parity part is the 1x1 identity, which makes a systematic
// encoder possible (parity = u_t + p_{t,1}). The delay H_{m_s} is non-zero
// by construction (offset MS of the information symbol).
//
// The code is time invariant (period T = 1) and its offsets are computed from
// MS so that every parameter size yields a regular code. Its six pairwise
// offset differences are all distinct, so the Tanner graph has no 4-cycles.
// This is a fixed choice of this design: a periodic code derived from a
// random block code matrix can replace it by changing only sym_delay().
//
// Fixed-point message format (this design's choice): channel values and
// check-to-variable messages are LLR_W-bit two's complement numbers, the
// a-posteriori sums (APP) APP_W bits, positive meaning bit 0.
package ldpccc_pkg;

  localparam int unsigned B = 1;   // information bits per code block
  localparam int unsigned C = 2;   // code bits per code block
  localparam int unsigned J = 3;   // checks per symbol (column weight)
  localparam int unsigned K = 6;   // symbols per check (row weight)

  localparam int unsigned LLR_W = 6;  // channel value / check message width
  localparam int unsigned APP_W = 8;  // a-posteriori sum width

  localparam int signed LLR_MAX = (1 <<< (LLR_W - 1)) - 1;
  localparam int signed APP_MAX = (1 <<< (APP_W - 1)) - 1;

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [APP_W-1:0] app_t;

  // One time slot of the decoding window: the c symbols of one code block,
  // each with its APP value and the J check-to-variable messages on its
  // edges, plus a flag marking slots that carry received data.
  typedef struct packed {
    logic                   valid;
    app_t [C-1:0]           app;
    llr_t [C-1:0][J-1:0]    c2v;
  } slot_t;

  // Step of a decoder time unit, broadcast by the decoder controller to all
  // processors so that they work in lockstep.
  typedef enum logic [2:0] {
    PH_IDLE,    // waiting for the next received code block
    PH_INIT,    // after reset: fill the window with known-zero slots
    PH_WRITE,   // store the slot entering each operating region
    PH_READ,    // read the K edges of the newest check node
    PH_UPDATE,  // check node activation, write back (unless asleep)
    PH_READ2,   // as PH_READ, for odd processors when regions overlap
    PH_UPDATE2, // as PH_UPDATE, for odd processors when regions overlap
    PH_OUT      // read the oldest slot, which leaves the segment
  } phase_t;

  // Access by a processor to one edge (j, k) that lies in the next
  // processor's window segment (compact decoder): read enable, write
  // enable and write data; the owner derives the address from the edge's
  // fixed offset.
  typedef struct packed {
    logic re;
    logic we;
    app_t app;
    llr_t c2v;
  } edge_req_t;

  typedef struct packed {
    app_t app;
    llr_t c2v;
  } edge_rsp_t;

  // Offset (in time units) between symbol j of a code block and its k-th
  // check node: symbol v_s^(j+1) is checked at times s + sym_delay(ms, j, k).
  function automatic int unsigned sym_delay(int unsigned ms, int unsigned j,
                                            int unsigned k);
    if (k == 0) return 0;
    if (j == 0) return (k == 1) ? (ms / 3 + 1) : ms;
    return (k == 1) ? (ms / 5 + 1) : ((3 * ms) / 4 + 1);
  endfunction

  // Slot holding a symbol known to be 0: the state before the first
  // received block (the encoder starts in the all-zero state).
  function automatic slot_t zero_slot();
    slot_t s;
    s.valid = 1'b0;
    for (int j = 0; j < C; j++) begin
      s.app[j] = app_t'(APP_MAX);
      for (int k = 0; k < J; k++) s.c2v[j][k] = '0;
    end
    return s;
  endfunction

endpackage
