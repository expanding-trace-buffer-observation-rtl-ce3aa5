// tb_tag_shift_reg: streams of random tag words (8 bits each) through the tag
// shift register for group sizes 1, 2, 3 and 5. Words are supplied one clock
// after need_word, as a buffer read would; the tag shown in every advancing
// clock must be bit (j / group) of the tag stream for the j-th advance. Also
// checks that running out of words raises `starved`.
module tb_tag_shift_reg;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         clear, advance, load, tag, need_word, starved;
  logic [31:0]  group;
  logic [W-1:0] load_word;

  tag_shift_reg #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] words [$];
  int next_word;
  logic req_q;

  // word server: answers need_word one clock later
  always @(posedge clk) begin
    if (clear) req_q <= 1'b0;
    else req_q <= need_word && !req_q && (next_word < words.size());
  end
  always_comb begin
    load      = req_q;
    load_word = words[next_word];
  end
  always @(posedge clk) if (load && !clear) next_word <= next_word + 1;

  task automatic run(int g, int nwords, int nadv);
    int j = 0;
    words.delete();
    for (int i = 0; i < nwords; i++) words.push_back(W'($urandom));
    @(negedge clk);
    group = g; clear = 1; next_word = 0;
    @(negedge clk); clear = 0;
    repeat (3) @(negedge clk);    // first word arrives
    while (j < nadv) begin
      advance = ($urandom_range(0, 2) != 0);
      if (advance) begin
        int b = j / ((g == 0) ? 1 : g);
        checks++;
        if (tag !== words[b / W][b % W]) begin
          failures++;
          if (failures < 10) $display("FAIL g=%0d adv %0d tag %0b", g, j, tag);
        end
        j++;
      end
      @(negedge clk);
    end
    advance = 0;
  endtask

  initial begin
    clear = 0; advance = 0; group = 1; req_q = 0; next_word = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 10, 80);
    run(2, 6, 96);
    run(3, 5, 120);
    run(0, 4, 32);
    checks++;
    if (starved) failures++;
    run(5, 4, 160);
    // use every bit, then one more advance: starved
    @(negedge clk); advance = 1;
    @(negedge clk); advance = 0;
    checks++;
    if (!starved || tag) begin failures++; $display("FAIL starved not flagged"); end
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
