// line_writer -- write path of the interleaved long line.
//
// Places one W-bit word and its parity bit(s) at the positions that word
// word_sel occupies in the N-way interleaved line (bit b at b*N + word_sel,
// parity set s at L + s*N + word_sel, see bp3d_edc_pkg) and raises the write
// mask for exactly those positions. The caller cuts line_data/line_mask into K
// die slices. Every other position keeps mask 0, so the remaining N-1 words
// of the physical row are untouched; line_data is 0 in those cells. Purely
// combinational.
// The layout is the document's; writing one word per access with a bit mask
// is this design's choice.
module line_writer
  import bp3d_edc_pkg::*;
#(
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned W      = 128,
  parameter int unsigned SETS   = 1,
  localparam int unsigned L     = N_WAYS * W,
  localparam int unsigned LINE  = L + SETS * N_WAYS,
  localparam int unsigned SEL_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic [SEL_W-1:0] word_sel,
  input  logic [W-1:0]     data,
  input  logic [SETS-1:0]  parity,
  output logic [LINE-1:0]  line_data,
  output logic [LINE-1:0]  line_mask
);

  always_comb begin
    for (int unsigned b = 0; b < W; b++) begin
      for (int unsigned w = 0; w < N_WAYS; w++) begin
        line_mask[data_pos(b, w, N_WAYS)] = (w == int'(word_sel));
        line_data[data_pos(b, w, N_WAYS)] = data[b] & (w == int'(word_sel));
      end
    end
    for (int unsigned s = 0; s < SETS; s++) begin
      for (int unsigned w = 0; w < N_WAYS; w++) begin
        line_mask[parity_pos(s, w, L, N_WAYS)] = (w == int'(word_sel));
        line_data[parity_pos(s, w, L, N_WAYS)] = parity[s] & (w == int'(word_sel));
      end
    end
  end

endmodule
