// tb_phase1_parity: session 1 with a small buffer (8 words of 8 bits) and the
// pipelined XOR tree. Streams of random words with gaps are observed; a RAM
// model collects the writes, and every parity bit still in the buffer is
// compared with the parity of its data word. Pointer, wrap flag, bit counters
// and the partial-word flush are checked after each run.
module tb_phase1_parity;
  localparam int W = 8, DEPTH = 8, AW = 3, BW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear, sample, finish, wr_en, wrapped;
  logic [W-1:0]  data, wr_data;
  logic [AW-1:0] wr_addr, wr_ptr;
  logic [BW-1:0] bit_idx;
  logic [31:0]   bit_total;

  phase1_parity #(.W(W), .DEPTH(DEPTH), .PIPE(1'b1)) dut (.*);

  logic [W-1:0] ram [DEPTH];
  always_ff @(posedge clk) if (wr_en) ram[wr_addr] <= wr_data;

  int checks = 0, failures = 0;
  logic par [$];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic run(int n);
    int total, full, part, lo;
    par.delete();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (par.size() < n) begin
      sample = ($urandom_range(0, 4) != 0);
      data   = W'($urandom);
      if (sample) par.push_back(^data);
      @(negedge clk);
    end
    sample = 0;
    @(negedge clk);            // pipeline drains
    finish = 1;
    @(negedge clk);
    finish = 0;
    @(negedge clk);
    total = n; full = n / W; part = n % W;
    chk(bit_total == 32'(n), "bit_total");
    chk(wr_ptr == AW'(full % DEPTH), "wr_ptr");
    chk(wrapped == (full >= DEPTH), "wrapped");
    chk(bit_idx == BW'(part), "bit_idx");
    lo = (full >= DEPTH) ? (full - DEPTH + ((part != 0) ? 1 : 0)) * W : 0;
    for (int k = lo; k < total; k++)
      chk(ram[(k / W) % DEPTH][k % W] == par[k], $sformatf("parity bit %0d of %0d", k, n));
    if (part != 0)
      for (int b = part; b < W; b++) chk(ram[full % DEPTH][b] == 1'b0, "flushed word padding");
  endtask

  initial begin
    clear = 0; sample = 0; finish = 0; data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(20);       // no wrap, partial word
    run(64);       // exactly full
    run(100);      // wrapped, partial word
    run(8 * 8 * 3);
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
