// phase2_compactor: session 2 of the selective-capture method (2-D compaction).
//
// Two compactors watch the same stream of qualified data words in the
// observation window. A MISR compacts runs of misr_interval consecutive words
// (window_size/k); at the end of each run its signature is written to the
// lower half of the trace buffer, signature j at word j, and the MISR restarts
// from zero so that the signatures are independent. A cycling register XORs
// word i into location DEPTH/2 + (i mod m) of the upper half. A workstation
// later compares both sets with fault-free signatures and intersects the
// mismatching ones to find the suspect cycles.
//
// The MISR uses write port A (lower half) and the cycling register read and
// write port B (upper half), so both work every clock. A finish pulse stores a
// last, partial MISR signature. misr_interval = 0 gives one signature for the
// whole window; m = 0 or m > DEPTH/2 uses m = DEPTH/2. Signatures beyond
// DEPTH/2 are dropped and flagged in overflow.
//
// The half/half split, the per-run MISR restart and the mod-m cycling
// register follow the method; the placement of the halves, the handling of a
// partial last run and the clamping of m are this design's choice.
module phase2_compactor #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  parameter logic [W-1:0] POLY = W'(dbg_pkg::MISR_POLY32),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,          // start of session
  input  logic          sample,         // qualified word inside the window
  input  logic [W-1:0]  data,
  input  logic          finish,         // end of session: store a partial signature
  input  logic [31:0]   misr_interval,
  input  logic [31:0]   cr_len,
  // MISR signatures, lower half (write port A)
  output logic          wa_en,
  output logic [AW-1:0] wa_addr,
  output logic [W-1:0]  wa_data,
  // cycling register, upper half (write and read port B)
  output logic          wb_en,
  output logic [AW-1:0] wb_addr,
  output logic [W-1:0]  wb_data,
  output logic          rb_en,
  output logic [AW-1:0] rb_addr,
  input  logic [W-1:0]  rb_data,
  output logic [31:0]   sig_count,      // MISR signatures stored
  output logic          overflow
);

  localparam int unsigned HALF = DEPTH / 2;

  logic [31:0]   icnt;
  logic          run_end, pending, store_run, store_last, room;
  logic [W-1:0]  sig, sig_next;
  logic [AW-1:0] m_eff;

  assign run_end    = sample && (misr_interval != 0) && (icnt == misr_interval - 1);
  assign room       = sig_count < HALF;
  assign store_run  = run_end && room;
  assign store_last = finish && pending && room;

  misr #(.W(W), .POLY(POLY)) u_misr (
    .clk, .rst_n, .en(sample), .clr(clear || run_end), .din(data), .sig, .sig_next
  );

  assign wa_en   = store_run || store_last;
  assign wa_addr = AW'(sig_count);
  assign wa_data = store_run ? sig_next : sig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt      <= '0;
      pending   <= 1'b0;
      sig_count <= '0;
      overflow  <= 1'b0;
    end else if (clear) begin
      icnt      <= '0;
      pending   <= 1'b0;
      sig_count <= '0;
      overflow  <= 1'b0;
    end else begin
      if (sample) begin
        icnt    <= run_end ? '0 : icnt + 1;
        pending <= !run_end;
      end
      if (run_end || (finish && pending)) begin
        if (room) sig_count <= sig_count + 1;
        else      overflow  <= 1'b1;
        if (finish) pending <= 1'b0;
      end
    end
  end

  assign m_eff = (cr_len == 0 || cr_len > HALF) ? AW'(HALF) : AW'(cr_len);

  cycling_register #(.W(W), .AW(AW)) u_cr (
    .clk, .rst_n, .clear, .en(sample), .din(data),
    .base(AW'(HALF)), .m(m_eff),
    .rd_en(rb_en), .rd_addr(rb_addr), .rd_data(rb_data),
    .wr_en(wb_en), .wr_addr(wb_addr), .wr_data(wb_data),
    .first_pass()
  );

endmodule
