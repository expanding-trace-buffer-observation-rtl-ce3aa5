// misr: multiple-input signature register of W bits.
//
// Galois-form LFSR with feedback polynomial POLY (default the maximal-length
// x^32 + x^22 + x^2 + x + 1); each enabled clock the register shifts left, the
// feedback is XORed in when the MSB falls out, and the data word is XORed over
// the whole register. sig_next shows the signature including the word being
// absorbed this clock, so a caller can store a signature and restart in the same
// clock: with en and clr both high the word is absorbed into sig_next and the
// register restarts from zero. The MISR and restarting it after each stored
// signature follow the method; the polynomial and the Galois form are this
// design's choice (the method only asks for a wide MISR, e.g. 32 bits).
module misr #(
  parameter int unsigned W        = 32,
  parameter logic [W-1:0] POLY    = W'(dbg_pkg::MISR_POLY32)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // absorb din this clock
  input  logic         clr,       // restart from zero after this clock
  input  logic [W-1:0] din,
  output logic [W-1:0] sig,       // current signature
  output logic [W-1:0] sig_next   // signature after absorbing din
);

  always_comb begin
    sig_next = {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= sig_next;
  end

endmodule
