// tb_phase2_compactor: 2-D compaction into a 64-word buffer model (32 MISR
// signatures, up to 32 cycling-register words). Each run feeds a random word
// stream with gaps and checks every MISR signature (runs of `interval` words,
// restarted after each, a partial last run stored on finish) and every
// cycling-register word (XOR of every m-th word) against testbench models.
// Also checked: the method's 15-cycle example (k = m = 5) where an error in
// cycle 13 must hit exactly MS5 and CR3, the 30-cycle example (k = m = 5)
// where errors in cycles 13 and 23 leave suspects 13, 18 and 23, and
// signature overflow.
module tb_phase2_compactor;
  localparam int W = 32, DEPTH = 64, AW = 6, HALF = 32;
  localparam logic [31:0] POLY = 32'h0040_0007;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear, sample, finish;
  logic [W-1:0]  data;
  logic [31:0]   misr_interval, cr_len, sig_count;
  logic          wa_en, wb_en, rb_en, overflow;
  logic [AW-1:0] wa_addr, wb_addr, rb_addr;
  logic [W-1:0]  wa_data, wb_data, rb_data;

  phase2_compactor #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] ram [DEPTH];
  always_ff @(posedge clk) begin
    if (wa_en) ram[wa_addr] <= wa_data;
    if (wb_en) ram[wb_addr] <= wb_data;
    if (rb_en) rb_data <= ram[rb_addr];
  end

  int checks = 0, failures = 0;
  logic [W-1:0] words [$];

  function automatic logic [31:0] step(logic [31:0] s, logic [31:0] d);
    return {s[30:0], 1'b0} ^ (s[31] ? POLY : 32'h0) ^ d;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  task automatic run(int n, int ivl, int m, logic [W-1:0] base_words [$]);
    int nsig, me;
    words = base_words;
    if (words.size() == 0) for (int i = 0; i < n; i++) words.push_back(W'({$urandom}));
    @(negedge clk);
    misr_interval = ivl; cr_len = m; clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < n; ) begin
      sample = ($urandom_range(0, 3) != 0);
      data = words[i];
      if (sample) i++;
      @(negedge clk);
    end
    sample = 0;
    @(negedge clk);
    finish = 1;
    @(negedge clk);
    finish = 0;
    @(negedge clk);
    nsig = (ivl == 0) ? 1 : (n + ivl - 1) / ivl;
    chk(sig_count == 32'((nsig > HALF) ? HALF : nsig), $sformatf("sig_count %0d", sig_count));
    chk(overflow == (nsig > HALF), "overflow flag");
    for (int s = 0; s < nsig && s < HALF; s++) begin
      logic [31:0] sg;
      int len;
      sg = 0;
      len = (ivl == 0) ? n : ivl;
      for (int j = s * len; j < (s + 1) * len && j < n; j++) sg = step(sg, words[j]);
      chk(ram[s] == sg, $sformatf("MISR signature %0d (n=%0d ivl=%0d)", s, n, ivl));
    end
    me = (m == 0 || m > HALF) ? HALF : m;
    for (int r = 0; r < me && r < n; r++) begin
      logic [31:0] c;
      c = 0;
      for (int j = r; j < n; j += me) c ^= words[j];
      chk(ram[HALF + r] == c, $sformatf("CR signature %0d (m=%0d)", r, me));
    end
  endtask

  initial begin
    logic [W-1:0] none [$];
    logic [W-1:0] good [$];
    logic [W-1:0] gms [5], gcr [5];
    clear = 0; sample = 0; finish = 0; data = '0; misr_interval = 0; cr_len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 15-cycle example: fault-free, then cycle 13 (index 12) erroneous
    for (int i = 0; i < 15; i++) good.push_back(W'(32'hC0DE_0000 + i * 32'h0101_0101));
    run(15, 3, 5, good);
    for (int s = 0; s < 5; s++) begin gms[s] = ram[s]; gcr[s] = ram[HALF + s]; end
    good[12] = good[12] ^ 32'h0000_0400;
    run(15, 3, 5, good);
    for (int s = 0; s < 5; s++) begin
      chk((ram[s] != gms[s]) == (s == 4), $sformatf("example: MS%0d mismatch", s + 1));
      chk((ram[HALF + s] != gcr[s]) == (s == 2), $sformatf("example: CR%0d mismatch", s + 1));
    end
    // 30-cycle example, k = m = 5: errors in cycles 13 and 23 hit MS3, MS4 and
    // CR3 only, and the intersection is cycles 13, 18 and 23
    good.delete();
    for (int i = 0; i < 30; i++) good.push_back(W'(32'h5EED_0000 ^ (i * 32'h0003_0201)));
    run(30, 6, 5, good);
    for (int s = 0; s < 5; s++) begin gms[s] = ram[s]; gcr[s] = ram[HALF + s]; end
    good[12] = good[12] ^ 32'h0001_0000;
    good[22] = good[22] ^ 32'h0000_0020;
    run(30, 6, 5, good);
    begin
      int sus [$];
      for (int s = 0; s < 5; s++) begin
        chk((ram[s] != gms[s]) == (s == 2 || s == 3), $sformatf("30-cycle example: MS%0d", s + 1));
        chk((ram[HALF + s] != gcr[s]) == (s == 2), $sformatf("30-cycle example: CR%0d", s + 1));
      end
      for (int c = 0; c < 30; c++)
        if ((ram[c / 6] != gms[c / 6]) && (ram[HALF + c % 5] != gcr[c % 5])) sus.push_back(c + 1);
      chk(sus.size() == 3 && sus[0] == 13 && sus[1] == 18 && sus[2] == 23, "30-cycle example: suspects C13, C18, C23");
    end
    run(200, 7, 13, none);     // partial last run, CR wraps
    run(96, 3, 32, none);      // exactly 32 signatures
    run(50, 1, 1, none);       // one word per signature, m = 1
    run(120, 3, 40, none);     // signature overflow, m clamped to 32
    run(30, 0, 0, none);       // one signature for the window
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
