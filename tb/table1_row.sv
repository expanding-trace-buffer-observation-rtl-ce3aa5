// table1_row: one configuration of the selective-capture evaluation run
// through the three sessions on its own debug module instance and clock.
//
// The row gives the trace-buffer size (DEPTH words of 32 bits), the expanded
// window to try (WIN cycles) and the number of erroneous data words in it
// (NERR, from the error rate). Errors are flipped into a pseudo-random
// fault-free stream in bursts of BURST consecutive words, as a misbehaving unit
// on a data bus tends to produce. Session 1 estimates the error rate from
// parity; session 2 uses k = m = DEPTH/2 signatures, one MISR run per WIN/k
// cycles; the tags are compressed with the smallest group size whose tag words
// fit in half the buffer; session 3 captures. Checked: stored signatures and
// captured words against models, and whether every erroneous word of the
// window ended up in the buffer. PIPE selects the pipelined parity tree.
// The result is reported on the ports.
module table1_row #(
  parameter int DEPTH = 128,
  parameter int WIN   = 19456,
  parameter int NERR  = 3,
  parameter int BURST = 1,
  parameter int SEED  = 1,
  parameter bit PIPE  = 1'b0
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output bit   achieved
);
  import dbg_pkg::*;

  localparam int W    = 32;
  localparam int AW   = $clog2(DEPTH);
  localparam int HALF = DEPTH / 2;
  localparam int WS   = 1000;              // cycles before the window
  localparam int IVL  = WIN / HALF;        // window_size / k
  localparam int G    = (WIN + HALF * W - 1) / (HALF * W);
  localparam int NTB  = (WIN + G - 1) / G;
  localparam int NTW  = (NTB + W - 1) / W;
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

  debug_module #(.DEPTH(DEPTH), .PIPE(PIPE)) dut (.*);

  int unsigned qidx = 0;
  logic [31:0] err_mask [int];
  logic [W-1:0] buffer [DEPTH];

  function automatic logic [31:0] golden(int unsigned i);
    logic [31:0] x;
    x = (i + SEED * 32'h0100_0000) * 32'h9E37_79B1 + 32'h7F4A_7C15;
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
      $display("FAIL row %0d B/%0d: %s", DEPTH * 4, WIN, what);
    end
  endtask

  always @(posedge clk) begin
    if (start) qidx <= 0;
    else if (status.running && dbg_valid) qidx <= qidx + 1;
  end
  always_comb begin
    dbg_valid = status.running;
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

  bit mis_ms [HALF];
  bit mis_cr [HALF];
  logic [W-1:0] tagw [NTW];
  logic [W-1:0] expect_cap [$];

  initial begin
    int nb, placed, nsus, lo, pe, total, full, part, bad;
    bit ctag;
    finished = 0; checks = 0; failures = 0; achieved = 0;
    host_we = 0; host_re = 0; host_addr = '0; host_wdata = '0;
    start = 0; stop = 0; mode_sel = MODE_IDLE; cfg = '0;
    void'($urandom(SEED));
    // bursts of erroneous words inside the window
    placed = 0;
    while (placed < NERR) begin
      int p;
      p = WS + $urandom_range(0, WIN - BURST);
      for (int b = 0; b < BURST && placed < NERR; b++) begin
        if (!err_mask.exists(p + b)) placed++;
        err_mask[p + b] = 32'h1 << $urandom_range(0, 31);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // session 1: parity over the lead-in and the window
    cfg.win_start = 0;
    cfg.win_len   = 0;
    run_session(MODE_PARITY, WS + WIN);
    total = int'(status.p1_bit_total);
    full = total / W;
    part = total % W;
    read_buffer();
    lo = (full >= DEPTH) ? (full - DEPTH + ((part != 0) ? 1 : 0)) * W : 0;
    pe = 0; bad = 0;
    for (int k = lo; k < total; k++) begin
      logic bt;
      bt = buffer[(k / W) % DEPTH][k % W];
      if (bt != ^observed(k)) bad++;
      if (bt != ^golden(k)) pe++;
    end
    check(bad == 0, "session 1 parity bits");

    // session 2: 2-D compaction, k = m = DEPTH/2
    cfg.win_start     = WS;
    cfg.win_len       = WIN;
    cfg.misr_interval = IVL;
    cfg.cr_len        = HALF;
    run_session(MODE_COMPACT, 0);
    read_buffer();
    bad = 0;
    for (int s = 0; s < HALF; s++) begin
      logic [31:0] so, sg;
      so = 0; sg = 0;
      for (int j = s * IVL; j < (s + 1) * IVL && j < WIN; j++) begin
        so = misr_step(so, observed(WS + j));
        sg = misr_step(sg, golden(WS + j));
      end
      if (buffer[s] != so) bad++;
      mis_ms[s] = (buffer[s] != sg);
    end
    for (int r = 0; r < HALF; r++) begin
      logic [31:0] co, cg;
      co = 0; cg = 0;
      for (int j = r; j < WIN; j += HALF) begin
        co ^= observed(WS + j);
        cg ^= golden(WS + j);
      end
      if (buffer[HALF + r] != co) bad++;
      mis_cr[r] = (buffer[HALF + r] != cg);
    end
    check(bad == 0, "session 2 signatures");

    // workstation: tag bits, compressed G to one
    nsus = 0;
    for (int t = 0; t < NTW; t++) tagw[t] = '0;
    for (int bi = 0; bi < NTB; bi++) begin
      ctag = 0;
      for (int j = bi * G; j < (bi + 1) * G && j < WIN; j++)
        if (mis_ms[j / IVL] && mis_cr[j % HALF]) begin ctag = 1; nsus++; end
      tagw[bi / W][bi % W] = ctag;
      if (ctag)
        for (int j = bi * G; j < (bi + 1) * G && j < WIN; j++) expect_cap.push_back(observed(WS + j));
    end
    for (int t = 0; t < NTW; t++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(DEPTH - NTW + t); host_wdata = tagw[t];
    end
    @(negedge clk);
    host_we = 0;

    // session 3: selective capture
    cfg.tag_base  = DEPTH - NTW;
    cfg.tag_words = NTW;
    cfg.tag_group = G;
    cfg.cap_base  = 0;
    run_session(MODE_CAPTURE, 0);
    read_buffer();
    check(status.p3_cap_count + status.p3_drop_count == cnt_t'(expect_cap.size()),
          "session 3 every suspect captured or dropped");
    check(!status.p3_starved, "session 3 tags in time");
    bad = 0;
    if (status.p3_drop_count == 0)
      for (int c = 0; c < expect_cap.size(); c++) if (buffer[c] != expect_cap[c]) bad++;
    check(bad == 0, "session 3 captured words");
    // did every erroneous word of the window reach the buffer?
    achieved = (status.p3_drop_count == 0);
    foreach (err_mask[p]) begin
      bit f = 0;
      for (int c = 0; c < int'(status.p3_cap_count) && c < DEPTH; c++)
        if (buffer[c] == observed(p)) f = 1;
      if (!f) achieved = 0;
    end
    $display("row %0d B, window %0d (%0dx): %0d errors, parity estimate %0.3f%%, tag group %0d, %0d tag words, %0d suspects, %0d words captured, %0d dropped, all errors captured: %0s",
             DEPTH * 4, WIN, WIN / DEPTH, NERR, 200.0 * pe / real'(total - lo), G, NTW, nsus,
             status.p3_cap_count, status.p3_drop_count, achieved ? "yes" : "no");
    finished = 1;
  end
endmodule
