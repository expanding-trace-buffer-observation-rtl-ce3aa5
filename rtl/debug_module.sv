// debug_module: trace-buffer debug module with selective capture.
//
// A trace buffer of DEPTH x W bits normally records a signal bundle (here the
// W-bit "data word") for only DEPTH cycles. This module stretches that window
// by recording only the cycles that can hold errors, found with three runs of
// a repeatable debug scenario:
//   session 1 (MODE_PARITY)  one parity bit per cycle, packed into a circular
//                            buffer; comparing with simulation gives the error
//                            rate and so the largest window worth trying;
//   session 2 (MODE_COMPACT) 2-D compaction over the window: MISR signatures of
//                            consecutive runs of words into the lower half of the
//                            buffer, cycling-register signatures (XOR of every
//                            m-th word) into the upper half; intersecting the
//                            mismatching ones off-chip gives suspect cycles;
//   session 3 (MODE_CAPTURE) the host loads one tag bit per cycle (or per group
//                            of cycles) into the buffer, and the module captures
//                            the data word in each tagged cycle, overwriting tag
//                            words already read.
// The host selects the session with mode_sel and pulses start; the session ends
// at the end of the window (cfg.win_len != 0) or on stop. Between sessions the
// host reads and writes the buffer through the host port (read data one clock
// after host_re); host writes during a session are ignored. dbg_valid qualifies
// the data word: only qualified cycles are counted and observed.
// The three sessions and their blocks follow the method; the register-level
// interface, the window counting and the buffer banking are this design's.
module debug_module import dbg_pkg::*; #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  parameter bit          PIPE  = 1'b0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // observed signals
  input  logic [W-1:0]  dbg_data,
  input  logic          dbg_valid,
  // session control
  input  mode_e         mode_sel,
  input  logic          start,
  input  logic          stop,
  input  dbg_cfg_t      cfg,
  output dbg_status_t   status,
  // host access to the trace buffer
  input  logic          host_we,
  input  logic          host_re,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata
);

  mode_e mode;
  logic  clear, arming, running, finish, busy, done, sample;
  cnt_t  win_idx, cycle_count;

  mode_ctrl #(.ARM_CYC(3), .DRAIN(int'(PIPE) + 2)) u_ctrl (
    .clk, .rst_n, .mode_sel, .start, .stop, .data_valid(dbg_valid),
    .win_start(cfg.win_start), .win_len(cfg.win_len),
    .mode, .clear, .arming, .running, .finish, .busy, .done, .sample,
    .win_idx, .cycle_count
  );

  logic is_p1, is_p2, is_p3;
  assign is_p1 = (mode == MODE_PARITY);
  assign is_p2 = (mode == MODE_COMPACT);
  assign is_p3 = (mode == MODE_CAPTURE);

  // ---------------- phase 1: parity generation
  logic          p1_we;
  logic [AW-1:0] p1_waddr, p1_wr_ptr;
  logic [W-1:0]  p1_wdata;
  logic          p1_wrapped;
  logic [$clog2(W)-1:0] p1_bit_idx;
  logic [31:0]   p1_bit_total;

  phase1_parity #(.W(W), .DEPTH(DEPTH), .PIPE(PIPE)) u_p1 (
    .clk, .rst_n,
    .clear(clear && is_p1), .sample(sample && is_p1), .data(dbg_data),
    .finish(finish && is_p1),
    .wr_en(p1_we), .wr_addr(p1_waddr), .wr_data(p1_wdata),
    .wr_ptr(p1_wr_ptr), .wrapped(p1_wrapped), .bit_idx(p1_bit_idx),
    .bit_total(p1_bit_total)
  );

  // ---------------- phase 2: 2-D compaction
  logic          p2_wa_en, p2_wb_en, p2_rb_en;
  logic [AW-1:0] p2_wa_addr, p2_wb_addr, p2_rb_addr;
  logic [W-1:0]  p2_wa_data, p2_wb_data;
  logic [31:0]   p2_sig_count;
  logic          p2_overflow;

  // ---------------- phase 3: selective capture
  logic          p3_rd_en, p3_wr_en, p3_tag;
  logic [AW-1:0] p3_rd_addr, p3_wr_addr;
  logic [W-1:0]  p3_wr_data;
  logic [31:0]   p3_cap_count, p3_drop_count;
  logic          p3_overflow, p3_starved;

  // ---------------- trace buffer and its port selection
  logic          wa_en, wb_en, ra_en, rb_en;
  logic [AW-1:0] wa_addr, wb_addr, ra_addr, rb_addr;
  logic [W-1:0]  wa_data, wb_data, rb_data;

  phase2_compactor #(.W(W), .DEPTH(DEPTH)) u_p2 (
    .clk, .rst_n,
    .clear(clear && is_p2), .sample(sample && is_p2), .data(dbg_data),
    .finish(finish && is_p2),
    .misr_interval(cfg.misr_interval), .cr_len(cfg.cr_len),
    .wa_en(p2_wa_en), .wa_addr(p2_wa_addr), .wa_data(p2_wa_data),
    .wb_en(p2_wb_en), .wb_addr(p2_wb_addr), .wb_data(p2_wb_data),
    .rb_en(p2_rb_en), .rb_addr(p2_rb_addr), .rb_data(rb_data),
    .sig_count(p2_sig_count), .overflow(p2_overflow)
  );

  phase3_capture #(.W(W), .DEPTH(DEPTH)) u_p3 (
    .clk, .rst_n,
    .clear(clear && is_p3), .fetch_en((arming || running) && is_p3),
    .sample(sample && is_p3), .data(dbg_data),
    .tag_base(cfg.tag_base), .tag_words(cfg.tag_words),
    .tag_group(cfg.tag_group), .cap_base(cfg.cap_base),
    .rd_en(p3_rd_en), .rd_addr(p3_rd_addr), .rd_data(rb_data),
    .wr_en(p3_wr_en), .wr_addr(p3_wr_addr), .wr_data(p3_wr_data),
    .tag(p3_tag), .cap_count(p3_cap_count), .drop_count(p3_drop_count),
    .overflow(p3_overflow), .starved(p3_starved)
  );

  always_comb begin
    wa_en   = 1'b0;
    wa_addr = host_addr;
    wa_data = host_wdata;
    if (!busy) begin
      wa_en = host_we;
    end else begin
      unique case (mode)
        MODE_PARITY:  begin wa_en = p1_we;    wa_addr = p1_waddr;   wa_data = p1_wdata;   end
        MODE_COMPACT: begin wa_en = p2_wa_en; wa_addr = p2_wa_addr; wa_data = p2_wa_data; end
        MODE_CAPTURE: begin wa_en = p3_wr_en; wa_addr = p3_wr_addr; wa_data = p3_wr_data; end
        default: ;
      endcase
    end
  end

  assign wb_en   = busy && is_p2 && p2_wb_en;
  assign wb_addr = p2_wb_addr;
  assign wb_data = p2_wb_data;
  assign ra_en   = host_re;
  assign ra_addr = host_addr;
  assign rb_en   = busy && ((is_p2 && p2_rb_en) || (is_p3 && p3_rd_en));
  assign rb_addr = is_p3 ? p3_rd_addr : p2_rb_addr;

  trace_buffer #(.W(W), .DEPTH(DEPTH)) u_buf (
    .clk,
    .wa_en, .wa_addr, .wa_data,
    .wb_en, .wb_addr, .wb_data,
    .ra_en, .ra_addr, .ra_data(host_rdata),
    .rb_en, .rb_addr, .rb_data
  );

  always_comb begin
    status               = '0;
    status.busy          = busy;
    status.running       = running;
    status.done          = done;
    status.mode          = mode;
    status.cycle_count   = cycle_count;
    status.p1_wr_ptr     = cnt_t'(p1_wr_ptr);
    status.p1_wrapped    = p1_wrapped;
    status.p1_bit_total  = p1_bit_total;
    status.p2_sig_count  = p2_sig_count;
    status.p2_overflow   = p2_overflow;
    status.p3_cap_count  = p3_cap_count;
    status.p3_drop_count = p3_drop_count;
    status.p3_overflow   = p3_overflow;
    status.p3_starved    = p3_starved;
  end

endmodule
