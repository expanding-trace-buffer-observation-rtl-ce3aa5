// phase1_parity: session 1 of the selective-capture method (parity generation).
//
// Every qualified cycle the data word is reduced to one parity bit by an XOR
// tree. The bits are packed W to a trace-buffer word, bit i of a word holding
// the i-th parity bit of that word, and each full word is written to the next
// location of a circular buffer of DEPTH words; older words are overwritten,
// so at the end the buffer holds the parity of the most recent data words.
// A finish pulse at the end of the session writes a partly filled word (its
// unused upper bits zero) to the current location without advancing.
// The host reads wr_ptr, wrapped, bit_idx and bit_total to locate the oldest
// parity bit. Parity per cycle and circular overwrite follow the method; the
// packing order and the status counters are this design's choice.
//
// Timing: a parity bit leaves the tree PIPE clocks after its data word; a word
// write is presented on wr_* in the clock its last bit arrives.
module phase1_parity #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  parameter bit          PIPE  = 1'b0,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,      // start of session: empty the packer, pointer to 0
  input  logic          sample,     // data is a word of the session
  input  logic [W-1:0]  data,
  input  logic          finish,     // end of session: flush a partial word
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [W-1:0]  wr_data,
  output logic [AW-1:0] wr_ptr,     // next word to be written
  output logic          wrapped,    // wr_ptr has wrapped at least once
  output logic [BW-1:0] bit_idx,    // parity bits held in the partial word
  output logic [31:0]   bit_total   // parity bits generated in the session
);

  logic         p_valid, p_bit;
  logic [W-1:0] pack, word_next;
  logic         word_full;

  parity_tree #(.W(W), .PIPE(PIPE)) u_tree (
    .clk, .rst_n, .in_valid(sample), .data, .out_valid(p_valid), .parity(p_bit)
  );

  always_comb begin
    word_next          = pack;
    word_next[bit_idx] = p_bit;
  end

  assign word_full = p_valid && (bit_idx == BW'(W - 1));
  assign wr_en     = word_full || (finish && (bit_idx != '0));
  assign wr_addr   = wr_ptr;
  assign wr_data   = word_full ? word_next : pack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack      <= '0;
      bit_idx   <= '0;
      wr_ptr    <= '0;
      wrapped   <= 1'b0;
      bit_total <= '0;
    end else if (clear) begin
      pack      <= '0;
      bit_idx   <= '0;
      wr_ptr    <= '0;
      wrapped   <= 1'b0;
      bit_total <= '0;
    end else if (p_valid) begin
      bit_total <= bit_total + 1;
      if (word_full) begin
        pack    <= '0;
        bit_idx <= '0;
        wr_ptr  <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (wr_ptr == AW'(DEPTH - 1)) wrapped <= 1'b1;
      end else begin
        pack    <= word_next;
        bit_idx <= bit_idx + 1'b1;
      end
    end
  end

endmodule
