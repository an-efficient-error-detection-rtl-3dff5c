// bp3d_edc_sram -- 3D bit-partitioned SRAM with 2D bit-interleaved parity.
//
// K_DIES dies are stacked; every physical row spans all dies. A row holds
// N_WAYS words that are bit-interleaved as in a conventional N-way
// interleaved array, but the interleaved line (data followed by the N parity
// bits) is cut into K consecutive slices, one per die, so each word is spread
// over all dies and protected by a single parity bit. All parity bits land in
// the top die, and the stack needs N parity cells per row instead of the N*K
// of per-die interleaving. A burst of up to N adjacent cells inside one die
// row hits each word at most once and is always detected.
//
// Default size (document's main evaluation): N = K = 4, 128 data bits per die
// row, 4096 rows -> 4 x 4096 x 128 bits = 256 KB, 128-bit words, one 512-bit
// (64-byte) cache line per physical row, 129 cells per die row.
//
// Interface
//   Word address = {row, word_sel}; word_sel picks one of the N words in a row.
//   Write: wr_en with wr_addr/wr_data; the parity is generated and the word
//     and its parity cell(s) are written, in all dies, at the next rising edge.
//   Read: rd_en with rd_addr; one cycle later rd_valid=1 with rd_data,
//     rd_parity, rd_syndrome and rd_err (1 = parity mismatch detected).
//     rd_line shows the whole concatenated row read (all dies).
//   Test port: tst_wr_en writes tst_data into the cells of row tst_row chosen
//     by tst_mask, bypassing parity generation. It is used to preset cells and
//     to inject soft errors; it has priority over wr_en.
//   A read and a write of the same row in one cycle return the old contents.
//
// From the document: the layout of the line across dies, parity per word in
// the top die, N-to-1 read multiplexers followed by an XOR/compare check, and
// a one-cycle access. This design's choices: one word per write (bit-masked),
// the test port, the read-first rule, the reset of the read path only, and
// where the extra parity bits of the PAR_SETS > 1 option are placed.
module bp3d_edc_sram
  import bp3d_edc_pkg::*;
#(
  parameter int unsigned N_WAYS        = 4,     // interleaving degree N
  parameter int unsigned K_DIES        = 4,     // number of stacked dies K
  parameter int unsigned DIE_DATA_BITS = 128,   // logical die width (Table 2)
  parameter int unsigned ROWS          = 4096,  // logical die height (Table 2)
  parameter int unsigned PAR_SETS      = 1,     // parity bits per word (1 = proposed scheme)
  localparam int unsigned L        = K_DIES * DIE_DATA_BITS,  // data bits per physical row
  localparam int unsigned W        = L / N_WAYS,              // word width
  localparam int unsigned LINE     = L + PAR_SETS * N_WAYS,   // cells per physical row
  localparam int unsigned DIE_BITS = LINE / K_DIES,           // cells per die row
  localparam int unsigned ROW_W    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned SEL_W    = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned ADDR_W   = ROW_W + SEL_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // word write
  input  logic                wr_en,
  input  logic [ADDR_W-1:0]   wr_addr,
  input  logic [W-1:0]        wr_data,
  // word read
  input  logic                rd_en,
  input  logic [ADDR_W-1:0]   rd_addr,
  output logic                rd_valid,
  output logic [W-1:0]        rd_data,
  output logic [PAR_SETS-1:0] rd_parity,
  output logic [PAR_SETS-1:0] rd_syndrome,
  output logic                rd_err,
  output logic [LINE-1:0]     rd_line,
  // raw row write (preset / soft-error injection)
  input  logic                tst_wr_en,
  input  logic [ROW_W-1:0]    tst_row,
  input  logic [LINE-1:0]     tst_mask,
  input  logic [LINE-1:0]     tst_data
);

  if ((L % N_WAYS) != 0) begin : g_bad_width
    $error("K_DIES*DIE_DATA_BITS must be a multiple of N_WAYS");
  end
  if ((LINE % K_DIES) != 0) begin : g_bad_split
    $error("data plus parity cells of a row must split evenly over K_DIES dies");
  end

  // ---------------- write path: parity generation and interleaving ----------
  logic [SEL_W-1:0]    wr_sel;
  logic [ROW_W-1:0]    wr_row;
  logic [PAR_SETS-1:0] wr_parity;
  logic [LINE-1:0]     wl_data, wl_mask;
  logic [LINE-1:0]     line_wdata, line_wmask;
  logic [ROW_W-1:0]    line_wrow;
  logic                line_we;

  assign {wr_row, wr_sel} = wr_addr;

  parity_gen #(
    .N_WAYS(N_WAYS), .W(W), .SETS(PAR_SETS), .DIE_BITS(DIE_BITS)
  ) u_wr_parity (
    .word_sel(wr_sel),
    .data    (wr_data),
    .parity  (wr_parity)
  );

  line_writer #(
    .N_WAYS(N_WAYS), .W(W), .SETS(PAR_SETS)
  ) u_writer (
    .word_sel (wr_sel),
    .data     (wr_data),
    .parity   (wr_parity),
    .line_data(wl_data),
    .line_mask(wl_mask)
  );

  always_comb begin
    line_we    = wr_en | tst_wr_en;
    line_wrow  = tst_wr_en ? tst_row  : wr_row;
    line_wdata = tst_wr_en ? tst_data : wl_data;
    line_wmask = tst_wr_en ? tst_mask : wl_mask;
  end

  // ---------------- the die stack -------------------------------------------
  logic [SEL_W-1:0] rd_sel;
  logic [ROW_W-1:0] rd_row;
  logic [LINE-1:0]  line_q;

  assign {rd_row, rd_sel} = rd_addr;

  for (genvar d = 0; d < K_DIES; d++) begin : g_die
    bp_sram_die #(
      .ROWS(ROWS), .BITS(DIE_BITS)
    ) u_die (
      .clk    (clk),
      .rst_n  (rst_n),
      .we     (line_we),
      .wr_row (line_wrow),
      .wr_mask(line_wmask[d*DIE_BITS +: DIE_BITS]),
      .wr_data(line_wdata[d*DIE_BITS +: DIE_BITS]),
      .re     (rd_en),
      .rd_row (rd_row),
      .rd_q   (line_q[d*DIE_BITS +: DIE_BITS])   // die d is slice d of the line
    );
  end

  // ---------------- read path: N-to-1 muxes and parity check ----------------
  logic [SEL_W-1:0] rd_sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_sel_q <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rd_sel_q <= rd_sel;
    end
  end

  word_selector #(
    .N_WAYS(N_WAYS), .W(W), .SETS(PAR_SETS)
  ) u_select (
    .line    (line_q),
    .word_sel(rd_sel_q),
    .data    (rd_data),
    .parity  (rd_parity)
  );

  parity_checker #(
    .N_WAYS(N_WAYS), .W(W), .SETS(PAR_SETS), .DIE_BITS(DIE_BITS)
  ) u_check (
    .word_sel(rd_sel_q),
    .data    (rd_data),
    .parity  (rd_parity),
    .syndrome(rd_syndrome),
    .err     (rd_err)
  );

  assign rd_line = line_q;

`ifndef SYNTHESIS
  // The word write and the test write share the single write port of the dies.
  a_one_writer : assert property (@(posedge clk) !(wr_en && tst_wr_en))
    else $warning("wr_en and tst_wr_en in the same cycle: the test write wins");
`endif

endmodule
