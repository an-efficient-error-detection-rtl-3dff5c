// parity_gen -- parity bit generation for one interleaved word.
//
// The stored check bit of a word is the XOR of its data bits (even parity).
// With one parity set (SETS = 1, the scheme of the document) parity[0] is the
// XOR of all W bits, wherever in the die stack they are stored. With SETS > 1
// (the option with more parity bits) parity[s] is the XOR of only those bits
// of the word that lie in dies d with d mod SETS == s; which die a bit lies in
// depends on the word index word_sel, because the interleaved layout shifts
// from die to die. Purely combinational.
// Simple parity as the check code follows the document; even polarity and
// the die-based split of the two-set option are choices of this design.
module parity_gen
  import bp3d_edc_pkg::*;
#(
  parameter int unsigned N_WAYS   = 4,    // interleaving degree N
  parameter int unsigned W        = 128,  // word width
  parameter int unsigned SETS     = 1,    // parity bits per word
  parameter int unsigned DIE_BITS = 129,  // cells per die row
  localparam int unsigned SEL_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic [SEL_W-1:0] word_sel,
  input  logic [W-1:0]     data,
  output logic [SETS-1:0]  parity
);

  always_comb begin
    parity = '0;
    for (int unsigned s = 0; s < SETS; s++) begin
      for (int unsigned b = 0; b < W; b++) begin
        if (SETS == 1 || in_set(b, int'(word_sel), s, N_WAYS, DIE_BITS, SETS))
          parity[s] = parity[s] ^ data[b];
      end
    end
  end

endmodule
