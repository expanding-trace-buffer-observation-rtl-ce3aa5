// tb_mode_ctrl: session sequencing. For several windows (with and without an
// offset, bounded and ended by stop) it checks the single clear pulse, the
// three arming clocks, that `sample` marks exactly the qualified cycles of the
// window with the right win_idx, the drain length and finish pulse, that the
// latched mode follows mode_sel, and that a start while busy is ignored.
module tb_mode_ctrl;
  import dbg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e mode_sel, mode;
  logic  start, stop, data_valid;
  cnt_t  win_start, win_len, win_idx, cycle_count;
  logic  clear, arming, running, finish, busy, done, sample;

  mode_ctrl #(.ARM_CYC(3), .DRAIN(2)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // ws/wl: window; stop_at: qualified cycle at which stop is raised (0 = none)
  task automatic run(mode_e m, int ws, int wl, int stop_at);
    int nclear = 0, narm = 0, q = 0, nsamp = 0, ndrain = 0, nfin = 0;
    bit started_again = 0;
    @(negedge clk);
    mode_sel = m; win_start = ws; win_len = wl; start = 1;
    @(negedge clk);
    start = 0;
    chk(mode == m, "mode latched");
    while (!done) begin
      if (clear) nclear++;
      if (arming) narm++;
      data_valid = ($urandom_range(0, 3) != 0);
      stop = (stop_at != 0) && running && (q == stop_at);
      if (running && q == 5 && !started_again) begin
        // a start while running must be ignored
        start = 1; mode_sel = MODE_PARITY; started_again = 1;
      end else begin
        start = 0;
      end
      #1;
      if (running) begin
        bit in_w = data_valid && (q >= ws) && (wl == 0 || q < ws + wl);
        chk(sample == in_w, $sformatf("sample at qualified cycle %0d", q));
        if (sample) begin
          chk(win_idx == cnt_t'(q - ws), "win_idx");
          nsamp++;
        end
        chk(cycle_count == cnt_t'(q), "cycle_count");
        if (data_valid) q++;
      end else begin
        chk(!sample, "no sample outside running");
      end
      if (!busy && !done && !arming) chk(0, "left busy early");
      if (finish) nfin++;
      if (busy && !arming && !running) ndrain++;
      @(negedge clk);
    end
    start = 0; stop = 0;
    chk(nclear == 1, "one clear pulse");
    chk(narm == 3, "three arming clocks");
    chk(ndrain == 2 && nfin == 1, "drain of two clocks with one finish");
    chk(mode == m, "start while busy ignored");
    if (stop_at == 0) chk(nsamp == wl, $sformatf("window of %0d samples, got %0d", wl, nsamp));
    else chk(nsamp == ((stop_at + 1 < ws + wl || wl == 0) ? stop_at + 1 - ws : wl) ||
             nsamp == stop_at - ws, "samples until stop");
  endtask

  initial begin
    mode_sel = MODE_IDLE; start = 0; stop = 0; data_valid = 0; win_start = 0; win_len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // MODE_IDLE start does nothing
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk(!busy && !done, "idle start ignored");
    run(MODE_COMPACT, 10, 40, 0);
    run(MODE_CAPTURE, 0, 17, 0);
    run(MODE_PARITY, 0, 0, 60);
    run(MODE_COMPACT, 5, 1000, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
