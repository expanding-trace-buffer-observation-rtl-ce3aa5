// parity_tree: XOR tree that reduces the observed data word to one parity bit.
//
// Session 1 stores one parity bit per qualified cycle. The tree may be
// pipelined to meet timing: with PIPE = 0 it is purely combinational (parity
// and valid appear in the same clock as the data); with PIPE = 1 the parities
// of GROUP-bit slices are registered first and XORed together in the next
// clock, so the result appears one clock after the data. The XOR tree and the
// option to pipeline it follow the method; the slice size and the single
// optional stage are this design's choice.
module parity_tree #(
  parameter int unsigned W     = 32,
  parameter bit          PIPE  = 1'b0,
  parameter int unsigned GROUP = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] data,
  output logic         out_valid,
  output logic         parity
);

  localparam int unsigned NG = (W + GROUP - 1) / GROUP;

  logic [NG*GROUP-1:0] padded;
  logic [NG-1:0]       partial;

  assign padded = {{(NG*GROUP-W){1'b0}}, data};

  always_comb begin
    for (int g = 0; g < NG; g++) partial[g] = ^padded[g*GROUP +: GROUP];
  end

  if (PIPE) begin : g_pipe
    logic [NG-1:0] partial_q;
    logic          valid_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        partial_q <= '0;
        valid_q   <= 1'b0;
      end else begin
        partial_q <= partial;
        valid_q   <= in_valid;
      end
    end
    assign parity    = ^partial_q;
    assign out_valid = valid_q;
  end else begin : g_comb
    assign parity    = ^partial;
    assign out_valid = in_valid;
  end

endmodule
