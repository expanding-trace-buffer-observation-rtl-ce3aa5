// tag_shift_reg: serial access to the tag bits of session 3.
//
// The tag bits are stored W to a trace-buffer word, tag bit i of a word in bit
// i. A shift register holds the word being used and presents its bit 0 as the
// current tag; a second register holds the next word so the stream of tags
// never waits on the buffer. Each tag bit covers `group` consecutive qualified
// cycles (tag compression; group = 1 is one bit per cycle, 0 is taken as 1):
// every `advance` counts one cycle, and after `group` of them the register
// shifts right by one. When the last bit of a word is used the next word moves
// in. need_word asks for a word whenever the second register is empty; `load`
// delivers one. An advance with no tag word held sets `starved`, and the tag
// then reads 0.
// The shift register and grouped tag bits follow the method; the second
// register and the bit order are this design's choice.
module tag_shift_reg #(
  parameter int unsigned W = 32,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [31:0]  group,
  input  logic         advance,
  input  logic         load,
  input  logic [W-1:0] load_word,
  output logic         tag,
  output logic         need_word,
  output logic         starved
);

  logic [W-1:0]  sr, sr_n, nx, nx_n;
  logic [CW-1:0] sr_bits, sr_bits_n;
  logic          nx_v, nx_v_n;
  logic [31:0]   gcnt, gcnt_n, grp_eff;
  logic          starve_n;

  assign grp_eff   = (group == 0) ? 32'd1 : group;
  assign tag       = (sr_bits != '0) && sr[0];
  assign need_word = !nx_v;

  always_comb begin
    sr_n      = sr;
    sr_bits_n = sr_bits;
    nx_n      = nx;
    nx_v_n    = nx_v;
    gcnt_n    = gcnt;
    starve_n  = starved;
    if (advance) begin
      if (sr_bits == '0) begin
        starve_n = 1'b1;
      end else if (gcnt == grp_eff - 1) begin
        gcnt_n = '0;
        if (sr_bits == CW'(1)) begin
          if (nx_v) begin
            sr_n      = nx;
            sr_bits_n = CW'(W);
            nx_v_n    = 1'b0;
          end else begin
            sr_bits_n = '0;
          end
        end else begin
          sr_n      = sr >> 1;
          sr_bits_n = sr_bits - 1'b1;
        end
      end else begin
        gcnt_n = gcnt + 1;
      end
    end
    if (load) begin
      if (sr_bits_n == '0) begin
        sr_n      = load_word;
        sr_bits_n = CW'(W);
      end else begin
        nx_n   = load_word;
        nx_v_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      sr_bits <= '0;
      nx      <= '0;
      nx_v    <= 1'b0;
      gcnt    <= '0;
      starved <= 1'b0;
    end else if (clear) begin
      sr      <= '0;
      sr_bits <= '0;
      nx      <= '0;
      nx_v    <= 1'b0;
      gcnt    <= '0;
      starved <= 1'b0;
    end else begin
      sr      <= sr_n;
      sr_bits <= sr_bits_n;
      nx      <= nx_n;
      nx_v    <= nx_v_n;
      gcnt    <= gcnt_n;
      starved <= starve_n;
    end
  end

endmodule
