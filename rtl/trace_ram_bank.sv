// trace_ram_bank: one bank of the trace buffer, a simple dual-port RAM.
//
// One synchronous write port and one synchronous read port. A read returns the
// word one clock after the address is presented; a read of the word being
// written in the same clock returns the old contents. The array is left
// uninitialised, as an SRAM would be: every session writes a location before
// anything reads it back.
module trace_ram_bank #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
