// tb_table1: the evaluation workloads. Each instance of table1_row runs one
// buffer-size / error-rate / expanded-window configuration of the method's
// results table through all three sessions on its own debug module. Rows
// differ only in size. The expanded window must be held with every erroneous
// word captured for the lowest and a medium error rate of each buffer size.
// One row uses the pipelined parity tree.
module tb_table1;
  localparam int NR = 8;
  logic fin [NR];
  int   chk [NR], fl [NR];
  bit   ach [NR];

  // 512 B .. 4 KB buffers at 0.016 % and 0.097 % error rates
  table1_row #(.DEPTH(128),  .WIN(19456),  .NERR(3),  .BURST(3), .SEED(1)) r0 (fin[0], chk[0], fl[0], ach[0]);
  table1_row #(.DEPTH(128),  .WIN(8576),   .NERR(8),  .BURST(4), .SEED(2), .PIPE(1'b1)) r1 (fin[1], chk[1], fl[1], ach[1]);
  table1_row #(.DEPTH(256),  .WIN(28672),  .NERR(5),  .BURST(3), .SEED(3)) r2 (fin[2], chk[2], fl[2], ach[2]);
  table1_row #(.DEPTH(256),  .WIN(17152),  .NERR(17), .BURST(4), .SEED(4)) r3 (fin[3], chk[3], fl[3], ach[3]);
  table1_row #(.DEPTH(512),  .WIN(61440),  .NERR(10), .BURST(3), .SEED(5)) r4 (fin[4], chk[4], fl[4], ach[4]);
  table1_row #(.DEPTH(512),  .WIN(26112),  .NERR(25), .BURST(4), .SEED(6)) r5 (fin[5], chk[5], fl[5], ach[5]);
  table1_row #(.DEPTH(1024), .WIN(132096), .NERR(21), .BURST(3), .SEED(7)) r6 (fin[6], chk[6], fl[6], ach[6]);
  table1_row #(.DEPTH(1024), .WIN(39936),  .NERR(39), .BURST(4), .SEED(8)) r7 (fin[7], chk[7], fl[7], ach[7]);

  initial begin
    int checks, failures;
    bit all_done;
    all_done = 0;
    while (!all_done) begin
      #1000;
      all_done = 1;
      for (int i = 0; i < NR; i++) if (!fin[i]) all_done = 0;
    end
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin
      checks += chk[i] + 1;
      failures += fl[i];
      if (!ach[i]) begin failures++; $display("FAIL row %0d: window not held", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
