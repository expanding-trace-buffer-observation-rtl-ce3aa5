// tb_misr: the MISR against a shift-register model written bit by bit (the
// Galois step as individual taps), including restart in the clock a signature
// is taken, hold when not enabled, and that a single-bit error in any word
// changes the signature.
module tb_misr;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         en, clr;
  logic [W-1:0] din, sig, sig_next;

  misr #(.W(W)) dut (.*);

  int checks = 0, failures = 0;

  // x^32 + x^22 + x^2 + x + 1: feedback into bits 22, 2, 1 and 0
  function automatic logic [W-1:0] ref_step(logic [W-1:0] s, logic [W-1:0] d);
    logic [W-1:0] n;
    logic fb = s[31];
    for (int i = W - 1; i > 0; i--) n[i] = s[i-1];
    n[0] = fb;
    n[1] = n[1] ^ fb;
    n[2] = n[2] ^ fb;
    n[22] = n[22] ^ fb;
    return n ^ d;
  endfunction

  initial begin
    logic [W-1:0] m, good, bad;
    en = 0; clr = 0; din = '0; m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (sig !== m) begin failures++; if (failures < 10) $display("FAIL %0d %h %h", i, sig, m); end
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 40) == 0);
      din = {$urandom};
      #1;
      checks++;
      if (sig_next !== ref_step(m, din)) failures++;
      if (clr) m = '0;
      else if (en) m = ref_step(m, din);
    end
    // single-bit error sensitivity: 20 words, one flipped bit
    for (int t = 0; t < 32; t++) begin
      good = '0; bad = '0;
      for (int i = 0; i < 20; i++) begin
        logic [W-1:0] d;
        d = W'(i * 32'h1234_5677 + t);
        good = ref_step(good, d);
        bad  = ref_step(bad, (i == t % 20) ? d ^ (W'(1) << t) : d);
      end
      // replay the faulty stream in the hardware
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0; en = 1;
      for (int i = 0; i < 20; i++) begin
        logic [W-1:0] d;
        d = W'(i * 32'h1234_5677 + t);
        din = (i == t % 20) ? d ^ (W'(1) << t) : d;
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (sig !== bad || sig === good) begin failures++; $display("FAIL error not seen t=%0d", t); end
    end
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
