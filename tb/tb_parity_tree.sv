// tb_parity_tree: random data words through the XOR tree, combinational and
// pipelined; the parity is compared with a bit count done in the testbench,
// and the pipelined version must deliver it exactly one clock later.
module tb_parity_tree;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         vin;
  logic [W-1:0] data;
  logic         v0, p0, v1, p1;

  parity_tree #(.W(W), .PIPE(1'b0)) dut0 (.clk, .rst_n, .in_valid(vin), .data, .out_valid(v0), .parity(p0));
  parity_tree #(.W(W), .PIPE(1'b1)) dut1 (.clk, .rst_n, .in_valid(vin), .data, .out_valid(v1), .parity(p1));

  int checks = 0, failures = 0;

  function automatic logic ref_par(logic [W-1:0] d);
    int n = 0;
    for (int i = 0; i < W; i++) if (d[i]) n++;
    return n[0];
  endfunction

  initial begin
    logic exp_prev, vprev;
    vin = 0; data = '0; exp_prev = 0; vprev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // pipelined result of last clock's input
      checks++;
      if (v1 !== vprev || (vprev && p1 !== exp_prev)) begin failures++; $display("FAIL pipe %0d", i); end
      data = (i < 32) ? (W'(1) << i) : {$urandom};
      vin  = (i % 5) != 2;
      #1;
      checks++;
      if (v0 !== vin || p0 !== ref_par(data)) begin failures++; $display("FAIL comb %0d", i); end
      exp_prev = ref_par(data);
      vprev    = vin;
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
