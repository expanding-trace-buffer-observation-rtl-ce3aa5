// tb_debug_module: end-to-end test of the debug module at its default size
// (32-bit data word, 1024-word trace buffer), running the three debug sessions
// on one repeatable data stream the way a debug engineer would.
//
// The stream is a fixed pseudo-random sequence (the "fault-free" data) with
// errors flipped into a few words. The same stream is replayed in every session.
// Between sessions the testbench plays the workstation: it reads the buffer,
// compares with the fault-free data, estimates the error rate (session 1),
// intersects mismatching MISR and cycling-register signatures into tag bits,
// compresses them two cycles per bit and loads them (session 2), and checks the
// captured words (session 3). Every stored word is also checked bit for bit
// against a model of what the hardware must have written. Three capture runs
// exercise tags placed above the capture area, tags overwritten as they are
// consumed, and a capture area too small for the suspects (words dropped).
// Each mechanism is counted and a failure is recorded for one that never happens.
module tb_debug_module;
  import dbg_pkg::*;

  localparam int W     = 32;
  localparam int DEPTH = 1024;
  localparam int AW    = 10;
  localparam int HALF  = DEPTH / 2;

  localparam int N1    = 40000;   // qualified cycles observed in session 1
  localparam int WS    = 10000;   // first cycle of the expanded window
  localparam int WL    = 12280;   // window length
  localparam int IVL   = 24;      // MISR interval (window_size / k)
  localparam int M     = 512;     // cycling register length
  localparam int G     = 2;       // tag group size (compression)
  localparam int NTB   = (WL + G - 1) / G;
  localparam int NTW   = (NTB + W - 1) / W;
  localparam int NSIG  = (WL + IVL - 1) / IVL;
  localparam logic [31:0] POLY = 32'h0040_0007;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]  dbg_data;
  logic          dbg_valid;
  mode_e         mode_sel;
  logic          start, stop;
  dbg_cfg_t      cfg;
  dbg_status_t   status;
  logic          host_we, host_re;
  logic [AW-1:0] host_addr;
  logic [W-1:0]  host_wdata, host_rdata;

  debug_module dut (.*);

  int checks = 0, failures = 0;
  int unsigned tick = 0, qidx = 0, gaps = 0;

  logic [31:0] err_mask [int];
  logic [W-1:0] buffer [DEPTH];

  // mechanism counters
  int m_wrap, m_flush, m_stop, m_gap, m_restart, m_partial_sig, m_cr_wrap;
  int m_compress, m_refill, m_overwrite_tags, m_drop, m_offset, m_autoend;

  function automatic logic [31:0] golden(int unsigned i);
    logic [31:0] x;
    x = i * 32'h9E37_79B1 + 32'h7F4A_7C15;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  function automatic logic [31:0] observed(int unsigned i);
    return err_mask.exists(int'(i)) ? golden(i) ^ err_mask[int'(i)] : golden(i);
  endfunction

  function automatic logic [31:0] misr_step(logic [31:0] s, logic [31:0] d);
    return {s[30:0], 1'b0} ^ (s[31] ? POLY : 32'h0) ^ d;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // stream source: one word per qualified cycle, one gap every 7 clocks
  always @(posedge clk) begin
    tick <= tick + 1;
    if (start) qidx <= 0;
    else if (status.running && dbg_valid) qidx <= qidx + 1;
    if (status.running && !dbg_valid) gaps <= gaps + 1;
  end
  always_comb begin
    dbg_valid = status.running && ((tick % 7) != 3);
    dbg_data  = observed(qidx);
  end

  task automatic read_buffer();
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      host_re = 1'b1;
      host_addr = AW'(a);
      @(posedge clk);
      #1 buffer[a] = host_rdata;
    end
    @(negedge clk);
    host_re = 1'b0;
  endtask

  task automatic write_word(int a, logic [W-1:0] d);
    @(negedge clk);
    host_we = 1'b1;
    host_addr = AW'(a);
    host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic run_session(mode_e m, int stop_after);
    @(negedge clk);
    mode_sel = m;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (stop_after > 0) begin
      while (qidx < stop_after) @(negedge clk);
      stop = 1'b1;
      @(negedge clk);
      stop = 1'b0;
    end
    while (!status.done) @(negedge clk);
  endtask

  // workstation data
  bit mis_ms [NSIG];
  bit mis_cr [M];
  bit tagb   [WL];
  bit ctag   [NTB];
  logic [W-1:0] tagw [NTW];
  logic [W-1:0] expect_cap [$];

  task automatic load_tags(int base, bit all_ones);
    for (int t = 0; t < NTW; t++) write_word(base + t, all_ones ? '1 : tagw[t]);
  endtask

  // Captured words must be exactly (no_drop) or a subsequence of the expected list.
  task automatic check_capture(int ncap, bit exact, string tag);
    int e = 0;
    bit ok = 1;
    if (ncap > DEPTH || ncap < 0) begin
      ok = 0;
      ncap = 0;
    end
    for (int c = 0; c < ncap; c++) begin
      if (exact) begin
        if (buffer[c] != expect_cap[c]) ok = 0;
      end else begin
        while (e < expect_cap.size() && expect_cap[e] != buffer[c]) e++;
        if (e >= expect_cap.size()) ok = 0;
        e++;
      end
    end
    check(ok, {tag, ": captured words differ from the suspect words"});
  endtask

  initial begin
    int nerr_win = 0;
    host_we = 0; host_re = 0; host_addr = '0; host_wdata = '0;
    start = 0; stop = 0; mode_sel = MODE_IDLE; cfg = '0;

    // errors: 12 inside the window (every third flips two bits, invisible to
    // parity), three outside it
    for (int e = 0; e < 12; e++) begin
      int p;
      logic [31:0] mk;
      p  = WS + 517 + (e * 997 + 13 * e * e) % (WL - 600);
      mk = 32'h1 << (e % 32);
      if (e % 3 == 0) mk |= 32'h1 << ((e + 7) % 32);
      err_mask[p] = mk;
      nerr_win++;
    end
    err_mask[3000]  = 32'h0000_0100;
    err_mask[25000] = 32'h0001_0000;
    err_mask[33333] = 32'h8000_0000;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- session 1: parity, whole run, ended by stop
    begin
      int total, full, part, lo, pe, bad, odd_err;
      real rate, wbound;
      cfg.win_start = 0;
      cfg.win_len   = 0;
      run_session(MODE_PARITY, N1);
      m_stop++;
      total = int'(status.p1_bit_total);
      check(total == int'(qidx), "session 1: parity bit count");
      if (total != int'(qidx)) total = int'(qidx);
      check(status.cycle_count == qidx, "session 1: cycle count");
      full = total / W;
      part = total % W;
      if (part != 0) m_flush++;
      check(status.p1_wr_ptr == cnt_t'(full % DEPTH), "session 1: write pointer");
      check(status.p1_wrapped == (full >= DEPTH), "session 1: wrap flag");
      if (status.p1_wrapped) m_wrap++;
      read_buffer();
      lo = (full >= DEPTH) ? (full - DEPTH + ((part != 0) ? 1 : 0)) * W : 0;
      pe = 0; bad = 0; odd_err = 0;
      for (int k = lo; k < total; k++) begin
        logic b;
        b = buffer[(k / W) % DEPTH][k % W];
        if (b != ^observed(k)) bad++;
        if (b != ^golden(k)) pe++;
        if (err_mask.exists(k) && ($countones(err_mask[k]) % 2 == 1)) odd_err++;
      end
      check(bad == 0, "session 1: stored parity bits");
      check(pe == odd_err, "session 1: parity mismatches equal odd-weight errors");
      rate   = 2.0 * pe / real'(total - lo);
      wbound = (pe > 0) ? DEPTH / rate : 1.0e12;
      $display("session 1: %0d parity bits kept, %0d mismatch, error rate ~%0.4f%%, window bound %0.0f cycles",
               total - lo, pe, 100.0 * rate, wbound);
      check(wbound >= real'(WL), "session 1: chosen window within the estimated bound");
    end

    // ---------------- session 2: 2-D compaction over the window
    begin
      int nsus = 0, missed = 0, bad = 0;
      cfg.win_start     = WS;
      cfg.win_len       = WL;
      cfg.misr_interval = IVL;
      cfg.cr_len        = M;
      run_session(MODE_COMPACT, 0);
      m_autoend++;
      if (WS > 0) m_offset++;
      check(qidx == WS + WL, "session 2: ended at the window end");
      check(status.p2_sig_count == NSIG, "session 2: MISR signature count");
      check(!status.p2_overflow, "session 2: no signature overflow");
      if (NSIG > 1) m_restart++;
      if (WL % IVL != 0) m_partial_sig++;
      if (WL > M) m_cr_wrap++;
      read_buffer();
      for (int s = 0; s < NSIG; s++) begin
        logic [31:0] so, sg;
        so = 0; sg = 0;
        for (int j = s * IVL; j < (s + 1) * IVL && j < WL; j++) begin
          so = misr_step(so, observed(WS + j));
          sg = misr_step(sg, golden(WS + j));
        end
        if (buffer[s] != so) bad++;
        mis_ms[s] = (buffer[s] != sg);
      end
      check(bad == 0, "session 2: MISR signatures");
      bad = 0;
      for (int r = 0; r < M; r++) begin
        logic [31:0] co, cg;
        co = 0; cg = 0;
        for (int j = r; j < WL; j += M) begin
          co ^= observed(WS + j);
          cg ^= golden(WS + j);
        end
        if (buffer[HALF + r] != co) bad++;
        mis_cr[r] = (buffer[HALF + r] != cg);
      end
      check(bad == 0, "session 2: cycling register signatures");
      // tag bits: intersection of mismatching signatures
      for (int j = 0; j < WL; j++) begin
        tagb[j] = mis_ms[j / IVL] && mis_cr[j % M];
        if (tagb[j]) nsus++;
        if (err_mask.exists(WS + j) && !tagb[j]) missed++;
      end
      check(missed == 0, "session 2: every erroneous cycle is a suspect");
      for (int b = 0; b < NTB; b++) begin
        ctag[b] = 0;
        for (int j = b * G; j < (b + 1) * G && j < WL; j++) ctag[b] |= tagb[j];
      end
      if (G > 1) m_compress++;
      for (int t = 0; t < NTW; t++) begin
        tagw[t] = '0;
        for (int i = 0; i < W; i++) if (t * W + i < NTB) tagw[t][i] = ctag[t * W + i];
      end
      if (NTW > 2) m_refill++;
      for (int j = 0; j < WL; j++) if (ctag[j / G]) expect_cap.push_back(observed(WS + j));
      $display("session 2: %0d errors in window, %0d suspects, %0d words to capture, %0d tag words",
               nerr_win, nsus, expect_cap.size(), NTW);
      check(expect_cap.size() <= DEPTH - NTW, "session 2: suspects fit beside the tags");
    end

    // ---------------- session 3a: tags at the top, capture from word 0
    cfg.tag_base  = DEPTH - NTW;
    cfg.tag_words = NTW;
    cfg.tag_group = G;
    cfg.cap_base  = 0;
    load_tags(DEPTH - NTW, 0);
    run_session(MODE_CAPTURE, 0);
    check(status.p3_cap_count == cnt_t'(expect_cap.size()), "session 3a: capture count");
    check(status.p3_drop_count == 0 && !status.p3_overflow, "session 3a: nothing dropped");
    check(!status.p3_starved, "session 3a: tags always ready");
    read_buffer();
    check_capture(expect_cap.size(), 1, "session 3a");
    begin
      int found = 0;
      foreach (err_mask[p]) if (p >= WS && p < WS + WL)
        foreach (expect_cap[c]) if (expect_cap[c] == observed(p)) begin found++; break; end
      check(found == nerr_win, "session 3a: every erroneous word captured");
      $display("session 3a: %0d words captured over a %0d-cycle window (%0dx the %0d-cycle plain window)",
               status.p3_cap_count, WL, WL / DEPTH, DEPTH);
    end

    // ---------------- session 3b: tags at word 0, overwritten once read
    cfg.tag_base = 0;
    load_tags(0, 0);
    run_session(MODE_CAPTURE, 0);
    check(status.p3_cap_count + status.p3_drop_count == cnt_t'(expect_cap.size()),
          "session 3b: every suspect captured or dropped");
    check(!status.p3_starved, "session 3b: tags always ready");
    if (status.p3_cap_count > 0) m_overwrite_tags++;
    read_buffer();
    check_capture(int'(status.p3_cap_count), status.p3_drop_count == 0, "session 3b");

    // ---------------- session 3c: every cycle tagged, capture area overflows
    cfg.tag_base = DEPTH - NTW;
    load_tags(DEPTH - NTW, 1);
    expect_cap.delete();
    for (int j = 0; j < WL; j++) expect_cap.push_back(observed(WS + j));
    run_session(MODE_CAPTURE, 0);
    check(status.p3_cap_count + status.p3_drop_count == cnt_t'(WL), "session 3c: captured + dropped");
    check(status.p3_overflow && status.p3_drop_count > 0, "session 3c: overflow flagged");
    check(status.p3_cap_count >= cnt_t'(DEPTH - NTW) && status.p3_cap_count <= cnt_t'(DEPTH),
          "session 3c: capture filled the buffer");
    if (status.p3_drop_count > 0) m_drop++;
    read_buffer();
    check_capture(DEPTH - NTW, 1, "session 3c (before the tag area)");
    check_capture(int'(status.p3_cap_count), 0, "session 3c (whole buffer)");

    if (gaps > 0) m_gap++;
    $display("mechanisms: wrap=%0d flush=%0d stop=%0d gap=%0d misr_restart=%0d partial_sig=%0d cr_wrap=%0d",
             m_wrap, m_flush, m_stop, m_gap, m_restart, m_partial_sig, m_cr_wrap);
    $display("            compress=%0d refill=%0d overwrite_tags=%0d drop=%0d offset=%0d autoend=%0d",
             m_compress, m_refill, m_overwrite_tags, m_drop, m_offset, m_autoend);
    check(m_wrap > 0, "mechanism: parity buffer wrap");
    check(m_flush > 0, "mechanism: partial parity word flush");
    check(m_stop > 0, "mechanism: session ended by stop");
    check(m_gap > 0, "mechanism: unqualified cycles");
    check(m_restart > 0, "mechanism: MISR store and restart");
    check(m_partial_sig > 0, "mechanism: partial last MISR signature");
    check(m_cr_wrap > 0, "mechanism: cycling register wrap");
    check(m_compress > 0, "mechanism: tag compression");
    check(m_refill > 0, "mechanism: tag word refill");
    check(m_overwrite_tags > 0, "mechanism: capture over read tags");
    check(m_drop > 0, "mechanism: capture overflow");
    check(m_offset > 0, "mechanism: window offset");
    check(m_autoend > 0, "mechanism: session ended at window end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
