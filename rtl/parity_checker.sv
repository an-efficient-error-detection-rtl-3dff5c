// parity_checker -- error detection on a word read from the stack.
//
// Recomputes the parity of the word with parity_gen and compares it with the
// parity bit(s) read together with the word. syndrome[s] = 1 when set s
// disagrees; err is the OR of the syndrome bits. An odd number of flipped bits
// in the cells covered by one parity bit (data or parity cell) is detected;
// an even number is not. Purely combinational, so the check completes in the
// same cycle as the read data.
// The XOR-and-compare check follows the document; the per-set syndrome output
// is this design's addition.
module parity_checker #(
  parameter int unsigned N_WAYS   = 4,
  parameter int unsigned W        = 128,
  parameter int unsigned SETS     = 1,
  parameter int unsigned DIE_BITS = 129,
  localparam int unsigned SEL_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic [SEL_W-1:0] word_sel,
  input  logic [W-1:0]     data,
  input  logic [SETS-1:0]  parity,
  output logic [SETS-1:0]  syndrome,
  output logic             err
);

  logic [SETS-1:0] recomputed;

  parity_gen #(
    .N_WAYS(N_WAYS), .W(W), .SETS(SETS), .DIE_BITS(DIE_BITS)
  ) u_gen (
    .word_sel(word_sel),
    .data    (data),
    .parity  (recomputed)
  );

  assign syndrome = recomputed ^ parity;
  assign err      = |syndrome;

endmodule
