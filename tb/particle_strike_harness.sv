// particle_strike_harness -- Monte Carlo soft-error campaign on one full-size
// bp3d_edc_sram configuration.
//
// Strike model: a particle enters the top die at a random cell. In every die
// it crosses it upsets a rectangle of cells around the struck spot whose
// width and height are 1 + floor(|g| * sigma) cells, g standard normal, with
// sigma = (N-1)/2.326 so that 98% of bursts are no wider than N cells. It then
// leaves in a random direction (theta 0..360 deg in the die plane, phi 0..180
// deg against it) and travels one die pitch down (TSV depth 100 um over a
// 284 nm cell = 352 cells), which moves it by 352*cot(phi) cells sideways.
// It stops when it leaves the die area or passes the bottom die.
//
// For every particle the upsets are applied to the memory row by row through
// the test port (XOR of the row read first), every word of each hit row is
// read, and the error flag is compared with the reference: an odd number of
// upset cells among the word's data cells and parity cell of one parity set
// (set s covers the cells in dies d with d mod SETS == s). Afterwards
// the upsets are undone. Reported: particles, particles hitting more than one
// die, particles whose every corrupted word was flagged (the design), and the
// same figure for per-die parity (N parity bits in every die, the conventional
// arrangement), computed from the upset map alone for comparison. Rates are
// also printed for every BATCH particles.
module particle_strike_harness #(
  parameter int unsigned N_WAYS    = 4,
  parameter int unsigned K_DIES    = 4,
  parameter int unsigned DDB       = 128,
  parameter int unsigned ROWS      = 4096,
  parameter int unsigned SETS      = 1,
  parameter int unsigned PARTICLES = 10000,
  parameter int unsigned BATCH     = 10000   // particles per printed batch
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned L      = K_DIES * DDB;
  localparam int unsigned W      = L / N_WAYS;
  localparam int unsigned LINE   = L + SETS * N_WAYS;
  localparam int unsigned DB     = LINE / K_DIES;
  localparam int unsigned ROW_W  = $clog2(ROWS);
  localparam int unsigned SEL_W  = $clog2(N_WAYS);
  localparam int unsigned ADDR_W = ROW_W + SEL_W;
  localparam real PI     = 3.14159265358979;
  localparam real PITCH  = 100000.0 / 284.0;             // die pitch in cells
  localparam real SIGMA  = (N_WAYS - 1) / 2.326;

  logic                rst_n;
  logic                wr_en, rd_en, tst_wr_en;
  logic [ADDR_W-1:0]   wr_addr, rd_addr;
  logic [W-1:0]        wr_data, rd_data;
  logic [SETS-1:0]     rd_parity, rd_syndrome;
  logic                rd_valid, rd_err;
  logic [LINE-1:0]     rd_line;
  logic [ROW_W-1:0]    tst_row;
  logic [LINE-1:0]     tst_mask, tst_data;

  bp3d_edc_sram #(
    .N_WAYS(N_WAYS), .K_DIES(K_DIES), .DIE_DATA_BITS(DDB), .ROWS(ROWS), .PAR_SETS(SETS)
  ) dut (.*);

  function automatic real uniform();
    return (real'($urandom % 1000000) + 0.5) / 1000000.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uniform())) * $cos(2.0 * PI * uniform());
  endfunction

  function automatic real absg();
    real g = gauss();
    return (g < 0.0) ? -g : g;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL [N=%0d] %s", N_WAYS, what); end
  endtask

  // upsets of one particle, one line mask per hit row
  logic [LINE-1:0] hit [int unsigned];

  task automatic apply(input int unsigned r, input logic [LINE-1:0] f);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = ADDR_W'(r << SEL_W);
    @(negedge clk);
    rd_en = 1'b0;
    tst_wr_en = 1'b1; tst_row = ROW_W'(r); tst_mask = f; tst_data = ~rd_line;
    @(negedge clk);
    tst_wr_en = 1'b0;
  endtask

  int b_ok_design, b_ok_conv;
  int n_particles, n_multi_die, n_ok_design, n_ok_conv, n_words_flagged, n_words_silent;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    n_particles = 0; n_multi_die = 0; n_ok_design = 0; n_ok_conv = 0;
    n_words_flagged = 0; n_words_silent = 0; b_ok_design = 0; b_ok_conv = 0;
    rd_en = 1'b0; wr_en = 1'b0; tst_wr_en = 1'b0;
    rd_addr = '0; wr_addr = '0; wr_data = '0; tst_row = '0; tst_mask = '0; tst_data = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned a = 0; a < ROWS * N_WAYS; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = ADDR_W'(a);
      wr_data = W'({$urandom, $urandom, $urandom, $urandom});
    end
    @(negedge clk);
    wr_en = 1'b0;

    for (int unsigned p = 0; p < PARTICLES; p++) begin
      automatic real x = real'($urandom % DB);
      automatic real y = real'($urandom % ROWS);
      automatic int  d = K_DIES - 1;
      automatic int  dies_hit = 0;
      automatic logic design_ok = 1'b1, conv_ok = 1'b1;
      hit.delete();
      // --- trajectory and upset map ---
      while (d >= 0 && x >= 0.0 && x < real'(DB) && y >= 0.0 && y < real'(ROWS)) begin
        automatic int ex = 1 + int'($floor(absg() * SIGMA));
        automatic int ey = 1 + int'($floor(absg() * SIGMA));
        automatic int x0 = int'($floor(x)) - (ex - 1) / 2;
        automatic int y0 = int'($floor(y)) - (ey - 1) / 2;
        automatic real th = 2.0 * PI * uniform();
        automatic real ph = PI * uniform();
        automatic real h  = PITCH * $cos(ph) / $sin(ph);
        for (int yy = y0; yy < y0 + ey; yy++)
          for (int xx = x0; xx < x0 + ex; xx++)
            if (yy >= 0 && yy < int'(ROWS) && xx >= 0 && xx < int'(DB)) begin
              if (!hit.exists(yy)) hit[yy] = '0;
              hit[yy][d * DB + xx] = 1'b1;
            end
        dies_hit++;
        d--;
        x += h * $cos(th);
        y += h * $sin(th);
      end
      n_particles++;
      if (dies_hit > 1) n_multi_die++;
      // --- apply, read, check, undo ---
      foreach (hit[r]) begin
        automatic logic [LINE-1:0] f = hit[r];
        apply(r, f);
        for (int unsigned w = 0; w <= N_WAYS; w++) begin
          @(negedge clk);
          if (w > 0) begin
            automatic int unsigned ww = w - 1;
            automatic int unsigned cnt = 0;
            automatic logic [SETS-1:0] odd = '0;
            for (int unsigned ss = 0; ss < SETS; ss++) begin
              cnt += 32'(f[L + ss * N_WAYS + ww]);
              odd[ss] ^= f[L + ss * N_WAYS + ww];
            end
            for (int unsigned b = 0; b < W; b++) begin
              cnt += 32'(f[b * N_WAYS + ww]);
              odd[((b * N_WAYS + ww) / DB) % SETS] ^= f[b * N_WAYS + ww];
            end
            chk(rd_valid && rd_err == (|odd),
                $sformatf("row %0d word %0d: err=%b, %0d upset cells", r, ww, rd_err, cnt));
            if (cnt != 0) begin
              if (rd_err) n_words_flagged++;
              else begin n_words_silent++; design_ok = 1'b0; end
            end
          end
          rd_en = (w < N_WAYS); rd_addr = ADDR_W'((r << SEL_W) | (w % N_WAYS));
        end
        @(negedge clk);
        rd_en = 1'b0;
        // per-die parity: group (die, word) with word = column mod N
        for (int unsigned dd = 0; dd < K_DIES; dd++)
          for (int unsigned w = 0; w < N_WAYS; w++) begin
            automatic int unsigned cnt = 0;
            for (int unsigned c = w; c < DB; c += N_WAYS) cnt += 32'(f[dd * DB + c]);
            if (cnt != 0 && cnt % 2 == 0) conv_ok = 1'b0;
          end
        apply(r, f);   // undo
      end
      if (design_ok) begin n_ok_design++; b_ok_design++; end
      if (conv_ok) begin n_ok_conv++; b_ok_conv++; end
      if ((p + 1) % BATCH == 0) begin
        $display("[N=K=%0d sets=%0d] batch %0d: fully detected %0.3f%% (per-die parity %0.3f%%)",
                 N_WAYS, SETS, (p + 1) / BATCH, 100.0 * b_ok_design / BATCH, 100.0 * b_ok_conv / BATCH);
        b_ok_design = 0; b_ok_conv = 0;
      end
    end
    $display("[N=K=%0d sets=%0d, %0d rows] particles=%0d multi-die=%0d words flagged=%0d silent=%0d",
             N_WAYS, SETS, ROWS, n_particles, n_multi_die, n_words_flagged, n_words_silent);
    $display("[N=K=%0d sets=%0d] fully detected: this design %0.3f%%, per-die parity %0.3f%%",
             N_WAYS, SETS, 100.0 * n_ok_design / n_particles, 100.0 * n_ok_conv / n_particles);
    chk(n_multi_die > 0, "some particle crossed several dies");
    chk(n_words_flagged > 0, "upsets were detected");
    done = 1'b1;
  end
endmodule
