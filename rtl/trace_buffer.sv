// trace_buffer: the on-chip trace memory shared by all three debug sessions.
//
// DEPTH words of W bits (default 1024 x 32 bits = 4 KB, the largest buffer the
// selective-capture method was evaluated with). The memory is split into two
// equal banks, the lower half (addresses below DEPTH/2) and the upper half, each
// with one write and one read port. Two write ports (A, B) and two read ports
// (A, B) are routed to the banks by the address MSB, so two writes (or two reads)
// can proceed in one clock as long as they fall in different halves. This is
// what session 2 needs: MISR signatures go to one half while the cycling
// register reads and rewrites a location of the other half every clock.
// Reads have one clock of latency. When both write ports hit the same bank, port
// A wins; the assertion flags it, since no session of the debug module does it.
// The split into two banks is this design's choice; the half/half use of the
// buffer in session 2 follows the method.
module trace_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wa_en,
  input  logic [AW-1:0] wa_addr,
  input  logic [W-1:0]  wa_data,
  input  logic          wb_en,
  input  logic [AW-1:0] wb_addr,
  input  logic [W-1:0]  wb_data,
  input  logic          ra_en,
  input  logic [AW-1:0] ra_addr,
  output logic [W-1:0]  ra_data,
  input  logic          rb_en,
  input  logic [AW-1:0] rb_addr,
  output logic [W-1:0]  rb_data
);

  localparam int unsigned HALF = DEPTH / 2;
  localparam int unsigned HAW  = AW - 1;

  logic          bank_we    [2];
  logic [HAW-1:0] bank_waddr [2];
  logic [W-1:0]  bank_wdata [2];
  logic          bank_re    [2];
  logic [HAW-1:0] bank_raddr [2];
  logic [W-1:0]  bank_rdata [2];
  logic          ra_bank_q, rb_bank_q;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (wa_en && (wa_addr[AW-1] == b[0])) begin
        bank_we[b]    = 1'b1;
        bank_waddr[b] = wa_addr[HAW-1:0];
        bank_wdata[b] = wa_data;
      end else begin
        bank_we[b]    = wb_en && (wb_addr[AW-1] == b[0]);
        bank_waddr[b] = wb_addr[HAW-1:0];
        bank_wdata[b] = wb_data;
      end
      if (ra_en && (ra_addr[AW-1] == b[0])) begin
        bank_re[b]    = 1'b1;
        bank_raddr[b] = ra_addr[HAW-1:0];
      end else begin
        bank_re[b]    = rb_en && (rb_addr[AW-1] == b[0]);
        bank_raddr[b] = rb_addr[HAW-1:0];
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    trace_ram_bank #(.W(W), .DEPTH(HALF)) u_bank (
      .clk   (clk),
      .we    (bank_we[b]),
      .waddr (bank_waddr[b]),
      .wdata (bank_wdata[b]),
      .re    (bank_re[b]),
      .raddr (bank_raddr[b]),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (ra_en) ra_bank_q <= ra_addr[AW-1];
    if (rb_en) rb_bank_q <= rb_addr[AW-1];
  end

  assign ra_data = bank_rdata[ra_bank_q];
  assign rb_data = bank_rdata[rb_bank_q];

  // Two ports of the same kind must not use the same bank in one clock.
  a_no_write_conflict : assert property (@(posedge clk)
    !(wa_en && wb_en && (wa_addr[AW-1] == wb_addr[AW-1])))
    else $error("trace_buffer: both write ports target bank %0d", wa_addr[AW-1]);
  a_no_read_conflict : assert property (@(posedge clk)
    !(ra_en && rb_en && (ra_addr[AW-1] == rb_addr[AW-1])))
    else $error("trace_buffer: both read ports target bank %0d", ra_addr[AW-1]);

endmodule
