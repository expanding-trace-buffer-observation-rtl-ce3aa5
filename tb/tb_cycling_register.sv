// tb_cycling_register: the cycling register with a small RAM model in the
// testbench standing in for the trace buffer (one-clock read latency, old data
// on read-during-write). Random word streams with gaps are compacted for
// several m, including m = 1 (forwarding) and m = 2, and each of the m words is
// compared with the XOR of every m-th data word computed in the testbench.
module tb_cycling_register;
  localparam int W = 32, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear, en;
  logic [W-1:0]  din, rd_data, wr_data;
  logic [AW-1:0] base, m, rd_addr, wr_addr;
  logic          rd_en, wr_en, first_pass;

  cycling_register #(.W(W), .AW(AW)) dut (.*);

  logic [W-1:0] ram [2**AW];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= ram[rd_addr];
    if (wr_en) ram[wr_addr] <= wr_data;
  end

  int checks = 0, failures = 0;

  task automatic run(int mm, int nwords, int b);
    logic [W-1:0] expv [64];
    int n = 0;
    for (int i = 0; i < 64; i++) begin expv[i] = '0; ram[i] = W'($urandom); end
    @(negedge clk);
    base = AW'(b); m = AW'(mm); clear = 1; en = 0;
    @(negedge clk);
    clear = 0;
    while (n < nwords) begin
      en  = ($urandom_range(0, 3) != 0);
      din = {$urandom};
      if (en) begin expv[n % mm] ^= din; n++; end
      @(negedge clk);
    end
    en = 0;
    repeat (3) @(negedge clk);
    for (int r = 0; r < mm && r < nwords; r++) begin
      checks++;
      if (ram[b + r] !== expv[r]) begin
        failures++;
        $display("FAIL m=%0d sig %0d: %h expected %h", mm, r, ram[b + r], expv[r]);
      end
    end
    checks++;
    if (first_pass !== (nwords < mm)) failures++;
  endtask

  initial begin
    clear = 0; en = 0; din = '0; base = '0; m = AW'(1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 15, 8);
    run(5, 37, 8);
    run(1, 20, 3);
    run(2, 41, 40);
    run(32, 500, 32);
    run(7, 4, 0);
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
