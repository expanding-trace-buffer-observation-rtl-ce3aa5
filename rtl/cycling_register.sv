// cycling_register: the cycling-register compactor of session 2.
//
// The m signatures live in the trace buffer, not in flip-flops: a mod-m address
// counter points at one of m words starting at BASE, and each qualified data
// word is XORed into the word it points at, after which the counter advances.
// Signature j therefore holds the XOR of data words j, j+m, j+2m, ... of the
// window. During the first pass over the m words the data word is written as it
// is, so the area needs no clearing beforehand.
//
// Timing: the read of the addressed word is issued in the clock the data word
// arrives, and the XORed word is written one clock later. When m = 1 the word
// being read is the word being written; the pending write value is then
// forwarded instead of the stale read data. The counter and the XOR into a
// buffer location follow the method; the read-modify-write pipeline, the
// first-pass rule and the forwarding are this design's choice.
module cycling_register #(
  parameter int unsigned W   = 32,
  parameter int unsigned AW  = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,     // start of session: counter to 0, first pass
  input  logic          en,        // absorb din this clock
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] base,      // first buffer word of the m signatures
  input  logic [AW-1:0] m,         // number of signatures, at least 1
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [W-1:0]  rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [W-1:0]  wr_data,
  output logic          first_pass
);

  logic [AW-1:0] idx;
  logic          v_q, first_q, fwd_q;
  logic [AW-1:0] idx_q;
  logic [W-1:0]  d_q, wdata_q;
  logic [AW-1:0] m_eff;

  assign m_eff   = (m == '0) ? AW'(1) : m;
  assign rd_en   = en && !first_pass;
  assign rd_addr = base + idx;

  assign wr_en   = v_q;
  assign wr_addr = base + idx_q;
  assign wr_data = d_q ^ (first_q ? '0 : (fwd_q ? wdata_q : rd_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      first_pass <= 1'b1;
      v_q        <= 1'b0;
      first_q    <= 1'b1;
      fwd_q      <= 1'b0;
      idx_q      <= '0;
      d_q        <= '0;
      wdata_q    <= '0;
    end else begin
      v_q     <= en && !clear;
      idx_q   <= idx;
      d_q     <= din;
      first_q <= first_pass;
      // The word read this clock is the one written this clock: forward it.
      fwd_q   <= v_q && (idx_q == idx);
      wdata_q <= wr_data;
      if (clear) begin
        idx        <= '0;
        first_pass <= 1'b1;
      end else if (en) begin
        if (idx == m_eff - 1'b1) begin
          idx        <= '0;
          first_pass <= 1'b0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
