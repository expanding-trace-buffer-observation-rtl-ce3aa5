// phase3_capture: session 3 of the selective-capture method (selective capture).
//
// Before the session the host writes the tag words, one tag bit per group of
// `tag_group` window cycles, to trace-buffer words [tag_base, tag_base+tag_words).
// During the session the tag words are fetched in order into a tag shift
// register, and in every window cycle whose tag bit is 1 the data word is
// written to the next capture location, counting up from cap_base. Captured
// data may overwrite tag words that have already been fetched, but never one
// still to be fetched: a suspect word that would do so, or that would run past
// the end of the buffer, is dropped and counted, and `overflow` is set. With
// the tags placed at the top of the buffer and capture starting at 0, the free
// words below the tags are the slack the method asks for.
//
// Timing: a tag read is issued when the shift register's second word is empty
// and lands one clock later; fetch_en must be high for at least two clocks
// after `clear` before the first window cycle so that the first tag word is
// in place (the mode controller's arming phase does this). A capture is
// written in the clock of its data word.
// Capture on tag bit, tags and data sharing the buffer and overwriting read
// tags follow the method; the fetch scheme, the drop rule and the counters are
// this design's choice.
module phase3_capture #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,       // start of session
  input  logic          fetch_en,    // tag fetching allowed (arming and running)
  input  logic          sample,      // qualified word inside the window
  input  logic [W-1:0]  data,
  input  logic [31:0]   tag_base,
  input  logic [31:0]   tag_words,
  input  logic [31:0]   tag_group,
  input  logic [31:0]   cap_base,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [W-1:0]  rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [W-1:0]  wr_data,
  output logic          tag,         // tag bit of the current window cycle
  output logic [31:0]   cap_count,
  output logic [31:0]   drop_count,
  output logic          overflow,
  output logic          starved
);

  logic [31:0] next_tag;   // next tag word to fetch; words from here on are unread
  logic [31:0] tag_end;
  logic [31:0] cap_ptr;
  logic        pend, need_word, hit, room;

  assign tag_end = (tag_base + tag_words > DEPTH) ? DEPTH : tag_base + tag_words;

  assign rd_en   = fetch_en && !clear && need_word && !pend && (next_tag < tag_end);
  assign rd_addr = AW'(next_tag);

  tag_shift_reg #(.W(W)) u_tags (
    .clk, .rst_n, .clear, .group(tag_group), .advance(sample),
    .load(pend), .load_word(rd_data), .tag, .need_word, .starved
  );

  assign hit     = sample && tag;
  assign room    = (cap_ptr < DEPTH) && ((cap_ptr < next_tag) || (cap_ptr >= tag_end));
  assign wr_en   = hit && room;
  assign wr_addr = AW'(cap_ptr);
  assign wr_data = data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_tag   <= '0;
      cap_ptr    <= '0;
      pend       <= 1'b0;
      cap_count  <= '0;
      drop_count <= '0;
      overflow   <= 1'b0;
    end else if (clear) begin
      next_tag   <= tag_base;
      cap_ptr    <= cap_base;
      pend       <= 1'b0;
      cap_count  <= '0;
      drop_count <= '0;
      overflow   <= 1'b0;
    end else begin
      pend <= rd_en;
      if (rd_en) next_tag <= next_tag + 1;
      if (wr_en) begin
        cap_ptr   <= cap_ptr + 1;
        cap_count <= cap_count + 1;
      end else if (hit) begin
        drop_count <= drop_count + 1;
        overflow   <= 1'b1;
      end
    end
  end

endmodule
