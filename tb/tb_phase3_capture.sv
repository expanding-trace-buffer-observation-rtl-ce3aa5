// tb_phase3_capture: selective capture into a 64-word buffer model (16-bit
// words). Tag words are written into the model, the block is cleared and
// given two arming clocks, and a stream of words with gaps is applied. The
// words written to the buffer must be exactly the words of tagged cycles, in
// order, from cap_base up. A fixed 30-cycle example with compressed tags
// checks exactly which cycles land in the buffer. Random runs cover tags above the capture area, tags at
// word 0 that are overwritten as they are used (one tag per word, so
// capture never catches up with the unread tags), group sizes 1 and 3, and a
// capture area that fills up (words dropped, overflow set, and no unread tag
// word ever overwritten).
module tb_phase3_capture;
  localparam int W = 16, DEPTH = 64, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear, fetch_en, sample, rd_en, wr_en, tag, overflow, starved;
  logic [W-1:0]  data, rd_data, wr_data;
  logic [31:0]   tag_base, tag_words, tag_group, cap_base, cap_count, drop_count;
  logic [AW-1:0] rd_addr, wr_addr;

  phase3_capture #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] ram [DEPTH];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= ram[rd_addr];
    if (wr_en) ram[wr_addr] <= wr_data;
  end

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // every read must be of a tag word not yet overwritten by capture
  bit written [DEPTH];
  always @(posedge clk) if (rst_n && rd_en) begin
    checks++;
    if (written[rd_addr]) begin
      failures++;
      $display("FAIL tag word %0d read after being overwritten", rd_addr);
    end
  end
  always @(posedge clk) if (rst_n && wr_en) written[wr_addr] <= 1'b1;

  task automatic run(int n, int g, int tb_, int cb, int density, bit expect_exact);
    int ntw, nbits, j, ncap_exp, e;
    logic [W-1:0] tw [$];
    logic [W-1:0] expw [$];
    logic [W-1:0] d;
    nbits = (n + g - 1) / g;
    ntw = (nbits + W - 1) / W;
    for (int t = 0; t < ntw; t++) begin
      // density: 0 = a quarter of the bits, 1 = an eighth, 2 = all, 3 = one per word
      tw.push_back(W'($urandom) & W'($urandom) & ((density == 1) ? W'($urandom) : W'('1)));
      if (density == 2) tw[t] = '1;
      if (density == 3) tw[t] = W'(1) << (t % W);
      ram[tb_ + t] = tw[t];
    end
    for (int a = 0; a < DEPTH; a++) written[a] = 1'b0;
    @(negedge clk);
    tag_base = tb_; tag_words = ntw; tag_group = g; cap_base = cb;
    clear = 1; fetch_en = 1;
    @(negedge clk); clear = 0;
    repeat (2) @(negedge clk);
    j = 0;
    while (j < n) begin
      sample = ($urandom_range(0, 4) != 0);
      d = W'($urandom);
      data = d;
      if (sample) begin
        int b = j / g;
        if (tw[b / W][b % W]) expw.push_back(d);
        j++;
      end
      @(negedge clk);
    end
    sample = 0; fetch_en = 0;
    @(negedge clk);
    $display("run n=%0d: %0d tagged, %0d captured, %0d dropped", n, expw.size(), cap_count, drop_count);
    chk(cap_count + drop_count == 32'(expw.size()), "captured + dropped = tagged cycles");
    chk(!starved, "tags ready in time");
    if (expect_exact) begin
      chk(cap_count == 32'(expw.size()) && !overflow, "all tagged words captured");
      for (int c = 0; c < expw.size(); c++) chk(ram[cb + c] == expw[c], $sformatf("captured word %0d: %h expected %h", c, ram[cb + c], expw[c]));
    end else begin
      chk(overflow && drop_count > 0, "overflow flagged");
      e = 0;
      for (int c = 0; c < cap_count && c < DEPTH - cb; c++) begin
        while (e < expw.size() && expw[e] != ram[cb + c]) e++;
        chk(e < expw.size(), $sformatf("captured word %0d is a tagged word in order", c));
        e++;
      end
    end
  endtask

  initial begin
    clear = 0; fetch_en = 0; sample = 0; data = '0;
    tag_base = 0; tag_words = 0; tag_group = 1; cap_base = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 15 compressed tag bits 000000101001000 (two cycles per bit) over 30
    // cycles: cycles 13, 14, 17, 18, 23 and 24 are captured, in that order
    begin
      logic [W-1:0] cyc [30];
      ram[60] = W'(15'b000100101000000);   // bit b = compressed tag b
      @(negedge clk);
      tag_base = 60; tag_words = 1; tag_group = 2; cap_base = 0; clear = 1; fetch_en = 1;
      @(negedge clk); clear = 0;
      repeat (2) @(negedge clk);
      for (int c = 0; c < 30; c++) begin
        cyc[c] = W'(16'hC000 + c + 1);
        sample = 1; data = cyc[c];
        @(negedge clk);
      end
      sample = 0; fetch_en = 0;
      @(negedge clk);
      chk(cap_count == 6, "30-cycle example: six words captured");
      chk(ram[0] == cyc[12] && ram[1] == cyc[13] && ram[2] == cyc[16] &&
          ram[3] == cyc[17] && ram[4] == cyc[22] && ram[5] == cyc[23],
          "30-cycle example: C13, C14, C17, C18, C23, C24");
    end
    run(300, 1, 40, 0, 1, 1);    // tags at the top, sparse
    run(300, 1, 0, 0, 3, 1);     // tags at 0, overwritten once read
    run(300, 3, 50, 0, 1, 1);    // compressed tags, three cycles per bit
    run(640, 1, 24, 2, 0, 0);    // dense tags: capture area overflows
    run(200, 1, 50, 0, 2, 0);    // all tagged: fill to the end of the buffer
    chk(cap_count <= 32'(DEPTH), "never writes past the buffer");
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
