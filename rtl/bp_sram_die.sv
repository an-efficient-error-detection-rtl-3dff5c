// bp_sram_die -- cell array of one die in the bit-partitioned 3D SRAM stack.
//
// Each die holds, for every physical row, one consecutive slice of the
// interleaved long line (see bp3d_edc_pkg). The row decoder, the wordlines and
// the sense amplifiers of the die are modelled as a synchronous array:
//   * write: when we=1, the cells of row wr_row whose wr_mask bit is 1 take
//     wr_data at the rising clock edge (bit-masked, so writing one word does
//     not disturb the other N-1 words interleaved in the same row);
//   * read:  when re=1, row rd_row appears on rd_q after the next rising edge
//     (one-cycle access, the sense-amplifier output is held until the next read).
// A read and a write of the same row in one cycle return the old contents.
// The array itself has no reset, like an SRAM; rd_q is cleared by rst_n.
// The per-die organisation follows the document; masked writes, the read
// register and the read-first rule are choices of this design.
module bp_sram_die #(
  parameter int unsigned ROWS = 4096,  // logical die height (Table 2)
  parameter int unsigned BITS = 129,   // cells per die row: (L + N)/K for N = K = 4
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [BITS-1:0]  wr_mask,
  input  logic [BITS-1:0]  wr_data,
  input  logic             re,
  input  logic [ROW_W-1:0] rd_row,
  output logic [BITS-1:0]  rd_q
);

  logic [BITS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned i = 0; i < BITS; i++) begin
        if (wr_mask[i]) mem[wr_row][i] <= wr_data[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd_q <= '0;
    else if (re) rd_q <= mem[rd_row];
  end

endmodule
