// word_selector -- the N-to-1 column multiplexers of the read path.
//
// The rows read from the K dies are concatenated into the long line. For each
// data bit b one N-to-1 multiplexer picks line[b*N + word_sel] out of the N
// neighbouring cells b*N .. b*N+N-1; one more multiplexer per parity set picks
// the parity bit of the same word from the tail of the line. Because the
// concatenated line has the ordinary interleaved order, no bit has to be
// re-routed before the multiplexers. Purely combinational.
// The multiplexer arrangement follows the document; the multiplexer for the
// second parity set exists only with the two-set option.
module word_selector
  import bp3d_edc_pkg::*;
#(
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned W      = 128,
  parameter int unsigned SETS   = 1,
  localparam int unsigned L     = N_WAYS * W,
  localparam int unsigned LINE  = L + SETS * N_WAYS,
  localparam int unsigned SEL_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic [LINE-1:0]  line,
  input  logic [SEL_W-1:0] word_sel,
  output logic [W-1:0]     data,
  output logic [SETS-1:0]  parity
);

  for (genvar b = 0; b < W; b++) begin : g_data_mux
    logic [N_WAYS-1:0] group;
    assign group   = line[data_pos(b, 0, N_WAYS) +: N_WAYS];
    assign data[b] = group[word_sel];
  end

  for (genvar s = 0; s < SETS; s++) begin : g_parity_mux
    logic [N_WAYS-1:0] group;
    assign group     = line[parity_pos(s, 0, L, N_WAYS) +: N_WAYS];
    assign parity[s] = group[word_sel];
  end

endmodule
