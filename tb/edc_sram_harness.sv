// edc_sram_harness -- reusable end-to-end driver and checker for bp3d_edc_sram.
//
// Drives one instance of the memory with random word writes and reads, raw
// test-port writes and soft-error injection, and compares every read with a
// reference model of the whole line. The reference places the cells by
// walking the interleaved line with a running counter (word index fastest,
// then bit index, parity cells at the tail) and assigns each cell to the die
// that holds it, so it does not reuse the design's index arithmetic.
// Expected read values are sampled when the read is issued (read-first).
// Each cycle the next stimulus is applied first and the outputs of the
// previous read are checked afterwards, so they must come from registers.
//
// Checked per read: rd_valid exactly one cycle after rd_en, data, parity,
// syndrome and err. Mechanisms counted (each must occur at least once):
//   word writes, word reads, test-port writes, back-to-back reads,
//   read/write of one row in the same cycle, detected single flips,
//   detected bursts of up to N adjacent cells inside one die row,
//   two flips of one word in two adjacent dies: missed with one parity set,
//   caught with two parity sets.
// Outputs done/checks/failures when the sequence is over.
module edc_sram_harness #(
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned K_DIES = 4,
  parameter int unsigned DDB    = 16,   // data bits per die row
  parameter int unsigned ROWS   = 16,
  parameter int unsigned SETS   = 1,
  parameter int unsigned OPS    = 3000
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

  // ---------------- reference model ----------------------------------------
  int unsigned     cpos_of [N_WAYS][W];       // cell of bit b of word w
  int unsigned     ppos_of [N_WAYS][SETS];    // cell of parity set s of word w
  logic [LINE-1:0] ref_line [ROWS];

  function automatic int unsigned die_of(int unsigned c);
    int unsigned d = 0, edge_c = DB;
    while (c >= edge_c) begin d++; edge_c += DB; end
    return d;
  endfunction

  function automatic logic [W-1:0] ref_word(logic [LINE-1:0] ln, int unsigned w);
    logic [W-1:0] r;
    for (int unsigned b = 0; b < W; b++) r[b] = ln[cpos_of[w][b]];
    return r;
  endfunction

  function automatic logic [SETS-1:0] ref_par(logic [LINE-1:0] ln, int unsigned w);
    logic [SETS-1:0] r;
    for (int unsigned s = 0; s < SETS; s++) r[s] = ln[ppos_of[w][s]];
    return r;
  endfunction

  // syndrome: XOR of the data cells of each set and that set's parity cell
  function automatic logic [SETS-1:0] ref_syn(logic [LINE-1:0] ln, int unsigned w);
    logic [SETS-1:0] r = ref_par(ln, w);
    for (int unsigned b = 0; b < W; b++)
      r[die_of(cpos_of[w][b]) % SETS] ^= ln[cpos_of[w][b]];
    return r;
  endfunction

  function automatic logic [SETS-1:0] gen_par(logic [W-1:0] d, int unsigned w);
    logic [SETS-1:0] r = '0;
    for (int unsigned b = 0; b < W; b++) r[die_of(cpos_of[w][b]) % SETS] ^= d[b];
    return r;
  endfunction

  // ---------------- expectation of the read in flight -----------------------
  logic            exp_valid;
  logic [W-1:0]    exp_data;
  logic [SETS-1:0] exp_par, exp_syn;
  logic            exp_corrupt;   // some cell of the word differs from what was written
  int              exp_kind;      // injection that last touched the row (0 none)
  logic [W-1:0]    good_data [ROWS][N_WAYS];
  int              row_kind [ROWS];

  // mechanism counters
  int n_wr, n_rd, n_tst, n_b2b, n_collide, n_single, n_burst, n_cross_miss, n_cross_hit;
  logic prev_rd;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [N=%0d K=%0d S=%0d] %s", N_WAYS, K_DIES, SETS, what);
    end
  endtask

  // One clock cycle of stimulus, applied at the falling edge. The read issued
  // in the previous cycle is checked first.
  task automatic cycle(input logic rd, input int unsigned rrow, input int unsigned rsel,
                       input logic wr, input int unsigned wrow, input int unsigned wsel,
                       input logic [W-1:0] wdata,
                       input logic tst, input int unsigned trow,
                       input logic [LINE-1:0] tmask, input logic [LINE-1:0] tdata,
                       input int kind);
    logic            pv = exp_valid, pc = exp_corrupt;
    logic [W-1:0]    pd = exp_data;
    logic [SETS-1:0] pp = exp_par, ps = exp_syn;
    int              pk = exp_kind;
    @(negedge clk);
    // present this cycle's stimulus
    rd_en     = rd;
    rd_addr   = ADDR_W'((rrow << SEL_W) | rsel);
    wr_en     = wr && !tst;
    wr_addr   = ADDR_W'((wrow << SEL_W) | wsel);
    wr_data   = wdata;
    tst_wr_en = tst;
    tst_row   = ROW_W'(trow);
    tst_mask  = tmask;
    tst_data  = tdata;
    exp_valid = rd;
    if (rd) begin
      exp_data    = ref_word(ref_line[rrow], rsel);
      exp_par     = ref_par(ref_line[rrow], rsel);
      exp_syn     = ref_syn(ref_line[rrow], rsel);
      exp_corrupt = (exp_data !== good_data[rrow][rsel]);
      exp_kind    = row_kind[rrow];
      n_rd++;
      if (prev_rd) n_b2b++;
    end
    prev_rd = rd;
    if (tst) begin
      n_tst++;
      ref_line[trow] = (ref_line[trow] & ~tmask) | (tdata & tmask);
      row_kind[trow] = kind;
      if (rd && rrow == trow) n_collide++;
    end else if (wr) begin
      logic [SETS-1:0] p = gen_par(wdata, wsel);
      n_wr++;
      for (int unsigned b = 0; b < W; b++) ref_line[wrow][cpos_of[wsel][b]] = wdata[b];
      for (int unsigned s = 0; s < SETS; s++) ref_line[wrow][ppos_of[wsel][s]] = p[s];
      good_data[wrow][wsel] = wdata;
      if (rd && rrow == wrow) n_collide++;
    end
    // outputs of the read issued last cycle must not depend on the new inputs
    #1;
    chk(rd_valid == pv, "rd_valid one cycle after rd_en");
    if (pv) begin
      chk(rd_data === pd, $sformatf("read data %h expected %h", rd_data, pd));
      chk(rd_parity === pp, "read parity");
      chk(rd_syndrome === ps, $sformatf("syndrome %b expected %b", rd_syndrome, ps));
      chk(rd_err === (|ps), "error flag");
      if (rd_err && |ps) begin
        if (pk == 1) n_single++;
        if (pk == 2) n_burst++;
        if (pk == 3) n_cross_hit++;
      end
      if (!rd_err && pc && pk == 3) n_cross_miss++;
    end
  endtask

  task automatic idle();
    cycle(1'b0, 0, 0, 1'b0, 0, 0, '0, 1'b0, 0, '0, '0, 0);
  endtask

  task automatic read_row(input int unsigned r);
    for (int unsigned w = 0; w < N_WAYS; w++)
      cycle(1'b1, r, w, 1'b0, 0, 0, '0, 1'b0, 0, '0, '0, 0);
  endtask

  // flip the cells in `flips` of row r through the test port, then read the row
  task automatic inject(input int unsigned r, input logic [LINE-1:0] flips, input int kind);
    cycle(1'b0, 0, 0, 1'b0, 0, 0, '0, 1'b1, r, flips, ~ref_line[r], kind);
    read_row(r);
  endtask

  // rewrite every word of row r with fresh data
  task automatic scrub_row(input int unsigned r);
    for (int unsigned w = 0; w < N_WAYS; w++)
      cycle(1'b0, 0, 0, 1'b1, r, w, W'({$urandom, $urandom}), 1'b0, 0, '0, '0, 0);
    row_kind[r] = 0;
  endtask

  initial begin
    int unsigned c;
    done = 1'b0; checks = 0; failures = 0;
    n_wr = 0; n_rd = 0; n_tst = 0; n_b2b = 0; n_collide = 0;
    n_single = 0; n_burst = 0; n_cross_miss = 0; n_cross_hit = 0;
    prev_rd = 1'b0; exp_valid = 1'b0;
    exp_data = '0; exp_par = '0; exp_syn = '0; exp_corrupt = 1'b0; exp_kind = 0;
    rd_en = 1'b0; wr_en = 1'b0; tst_wr_en = 1'b0;
    rd_addr = '0; wr_addr = '0; wr_data = '0; tst_row = '0; tst_mask = '0; tst_data = '0;
    // cell map by walking the line
    c = 0;
    for (int unsigned b = 0; b < W; b++)
      for (int unsigned w = 0; w < N_WAYS; w++) cpos_of[w][b] = c++;
    for (int unsigned s = 0; s < SETS; s++)
      for (int unsigned w = 0; w < N_WAYS; w++) ppos_of[w][s] = c++;
    for (int r = 0; r < ROWS; r++) begin
      row_kind[r] = 0;
      ref_line[r] = '0;
    end

    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // every row: clean the whole line through the test port, then write all words
    for (int unsigned r = 0; r < ROWS; r++) begin
      cycle(1'b0, 0, 0, 1'b0, 0, 0, '0, 1'b1, r, '1, '0, 0);
      for (int unsigned w = 0; w < N_WAYS; w++) good_data[r][w] = '0;
      scrub_row(r);
    end
    for (int unsigned r = 0; r < ROWS; r++) read_row(r);   // back-to-back reads

    for (int unsigned i = 0; i < OPS; i++) begin
      automatic int unsigned r = $urandom % ROWS;
      automatic int unsigned sel = $urandom % 8;
      if (sel < 4) begin
        // random traffic, reads and writes together (sometimes the same row)
        automatic logic rd = 1'($urandom), wr = 1'($urandom);
        automatic int unsigned wrow = (($urandom % 4) == 0) ? r : ($urandom % ROWS);
        cycle(rd, r, $urandom % N_WAYS, wr, wrow, $urandom % N_WAYS,
              W'({$urandom, $urandom}), 1'b0, 0, '0, '0, 0);
      end else if (sel == 4) begin
        // single-cell upset anywhere in the row (data or parity cell)
        automatic logic [LINE-1:0] f = '0;
        f[$urandom % LINE] = 1'b1;
        inject(r, f, 1);
        scrub_row(r);
      end else if (sel == 5) begin
        // burst of 2..N adjacent cells inside one die row
        automatic logic [LINE-1:0] f = '0;
        automatic int unsigned d = $urandom % K_DIES;
        automatic int unsigned len = 2 + $urandom % (N_WAYS - 1);
        automatic int unsigned st = d * DB + $urandom % (DB - len + 1);
        for (int unsigned k = 0; k < len; k++) f[st + k] = 1'b1;
        inject(r, f, 2);
        scrub_row(r);
      end else if (sel == 6) begin
        // one bit of a word in die d and one in die d+1 (cross-die double upset)
        automatic logic [LINE-1:0] f = '0;
        automatic int unsigned w = $urandom % N_WAYS;
        int unsigned pairs [$];
        int unsigned b1, b2, pick;
        pairs.delete();
        for (int unsigned x = 0; x < W; x++)
          for (int unsigned y = 0; y < W; y++)
            if (die_of(cpos_of[w][y]) == die_of(cpos_of[w][x]) + 1) pairs.push_back(x * W + y);
        pick = pairs[$urandom % pairs.size()];
        b1 = pick / W;
        b2 = pick % W;
        f[cpos_of[w][b1]] = 1'b1;
        f[cpos_of[w][b2]] = 1'b1;
        inject(r, f, 3);
        scrub_row(r);
      end else begin
        // read and overwrite the same row in one cycle
        cycle(1'b1, r, $urandom % N_WAYS, 1'b1, r, $urandom % N_WAYS,
              W'({$urandom, $urandom}), 1'b0, 0, '0, '0, 0);
      end
    end
    idle();
    idle();

    $display("[N=%0d K=%0d sets=%0d] writes=%0d reads=%0d test_writes=%0d back_to_back=%0d collisions=%0d",
             N_WAYS, K_DIES, SETS, n_wr, n_rd, n_tst, n_b2b, n_collide);
    $display("[N=%0d K=%0d sets=%0d] detected: single=%0d in_die_burst=%0d cross_die=%0d; cross_die missed=%0d",
             N_WAYS, K_DIES, SETS, n_single, n_burst, n_cross_hit, n_cross_miss);
    chk(n_wr > 0 && n_rd > 0 && n_tst > 0, "writes, reads and test writes happened");
    chk(n_b2b > 0, "back-to-back reads happened");
    chk(n_collide > 0, "same-row read/write happened");
    chk(n_single > 0, "single upset detected");
    chk(n_burst > 0, "in-die burst detected");
    if (SETS == 1) chk(n_cross_miss > 0 && n_cross_hit == 0, "cross-die double upset escapes one parity bit");
    else           chk(n_cross_hit > 0 && n_cross_miss == 0, "cross-die double upset caught by two parity sets");
    done = 1'b1;
  end
endmodule
