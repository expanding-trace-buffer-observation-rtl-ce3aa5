// tb_trace_buffer: checks the two-bank trace buffer against a plain array
// model. Random traffic drives both write ports (always to different halves)
// and both read ports (likewise), and every read result is compared with the
// model one clock later. Read-during-write of the same word must return the
// old contents. Reduced to 64 words for speed.
module tb_trace_buffer;
  localparam int W = 16, DEPTH = 64, AW = 6, HALF = DEPTH / 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          wa_en, wb_en, ra_en, rb_en;
  logic [AW-1:0] wa_addr, wb_addr, ra_addr, rb_addr;
  logic [W-1:0]  wa_data, wb_data, ra_data, rb_data;

  trace_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    logic [W-1:0] exp_a, exp_b;
    logic         chk_a, chk_b;
    wa_en = 0; wb_en = 0; ra_en = 0; rb_en = 0;
    wa_addr = '0; wb_addr = '0; ra_addr = '0; rb_addr = '0; wa_data = '0; wb_data = '0;
    // fill every word through alternating ports
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      model[a] = W'($urandom);
      if (a % 2 == 0) begin wa_en = 1; wa_addr = AW'(a); wa_data = model[a]; wb_en = 0; end
      else            begin wb_en = 1; wb_addr = AW'(a); wb_data = model[a]; wa_en = 0; end
    end
    @(negedge clk);
    wa_en = 0; wb_en = 0;
    chk_a = 0; chk_b = 0; exp_a = '0; exp_b = '0;
    for (int i = 0; i < 3000; i++) begin
      bit ha, hw;
      @(negedge clk);
      // results of the reads issued last clock
      if (chk_a) begin checks++; if (ra_data !== exp_a) begin failures++; $display("FAIL A %h %h", ra_data, exp_a); end end
      if (chk_b) begin checks++; if (rb_data !== exp_b) begin failures++; $display("FAIL B %h %h", rb_data, exp_b); end end
      ha = $urandom_range(0, 1);   // half read by port A
      hw = $urandom_range(0, 1);   // half written by port A
      ra_en = $urandom_range(0, 3) != 0;
      rb_en = $urandom_range(0, 3) != 0;
      ra_addr = {ha, (AW-1)'($urandom)};
      if (i % 5 == 0) ra_addr = {hw, (AW-1)'(i)};  // sometimes read the word being written
      rb_addr = {~ra_addr[AW-1], (AW-1)'($urandom)};
      wa_en = $urandom_range(0, 1);
      wb_en = $urandom_range(0, 1);
      wa_addr = {hw, (AW-1)'(i)};
      wb_addr = {~hw, (AW-1)'($urandom)};
      wa_data = W'($urandom);
      wb_data = W'($urandom);
      // expected read data: contents before this clock's writes
      exp_a = model[ra_addr];
      exp_b = model[rb_addr];
      chk_a = ra_en;
      chk_b = rb_en;
      if (wa_en) model[wa_addr] = wa_data;
      if (wb_en) model[wb_addr] = wb_data;
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
