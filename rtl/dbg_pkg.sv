// dbg_pkg: types and constants shared by the selective-capture debug module.
//
// The debug module runs in one of three session modes (parity, 2-D compaction,
// selective capture). Its run-time configuration and its status are grouped in
// two packed structs so that a host register block can map them directly.
// All counters are 32 bits wide, enough for observation windows of several
// million qualified cycles.
package dbg_pkg;

  typedef enum logic [1:0] {
    MODE_IDLE    = 2'd0,  // no session
    MODE_PARITY  = 2'd1,  // session 1: one parity bit per data word
    MODE_COMPACT = 2'd2,  // session 2: MISR + cycling register signatures
    MODE_CAPTURE = 2'd3   // session 3: capture the data word in tagged cycles
  } mode_e;

  localparam int unsigned CNT_W = 32;
  typedef logic [CNT_W-1:0] cnt_t;

  // Maximal-length 32-bit feedback polynomial x^32 + x^22 + x^2 + x + 1,
  // written without the x^32 term, used by the MISR in its Galois form.
  localparam logic [31:0] MISR_POLY32 = 32'h0040_0007;

  // Run-time configuration, held stable by the host while a session runs.
  typedef struct packed {
    cnt_t win_start;      // qualified cycles skipped before the observation window
    cnt_t win_len;        // window length in qualified cycles, 0 = until stop
    cnt_t misr_interval;  // cycles compacted per MISR signature (window_size/k), 0 = one signature
    cnt_t cr_len;         // m, number of cycling-register signatures (0 or > half buffer = half buffer)
    cnt_t tag_base;       // first trace-buffer word holding tag bits (session 3)
    cnt_t tag_words;      // number of trace-buffer words holding tag bits
    cnt_t tag_group;      // cycles covered by one tag bit, 1 = uncompressed (0 treated as 1)
    cnt_t cap_base;       // first trace-buffer word written with captured data
  } dbg_cfg_t;

  // Status returned to the host.
  typedef struct packed {
    logic  busy;          // a session is arming, running or draining
    logic  running;       // data words are being observed
    logic  done;          // the last session has ended, buffer may be read
    mode_e mode;          // mode of the current or last session
    cnt_t  cycle_count;   // qualified cycles seen in the session
    cnt_t  p1_wr_ptr;     // session 1: next parity word to be written
    logic  p1_wrapped;    // session 1: the circular parity buffer wrapped
    cnt_t  p1_bit_total;  // session 1: parity bits generated
    cnt_t  p2_sig_count;  // session 2: MISR signatures stored
    logic  p2_overflow;   // session 2: more MISR signatures than the half buffer holds
    cnt_t  p3_cap_count;  // session 3: data words captured
    cnt_t  p3_drop_count; // session 3: suspect words dropped for lack of room
    logic  p3_overflow;   // session 3: at least one suspect word was dropped
    logic  p3_starved;    // session 3: a tag bit was needed before it was fetched
  } dbg_status_t;

endpackage
