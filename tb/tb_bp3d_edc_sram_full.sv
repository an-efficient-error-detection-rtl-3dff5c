// tb_bp3d_edc_sram_full -- one complete pass over the full-size memory with
// every parameter at its default: N = K = 4, 4096 rows, 128 data bits per die
// row (256 KB of data, 128-bit words, 129 cells per die row).
// Writes all 16384 words, reads them all back (one read per cycle, data valid
// one cycle later, no error flagged), then on a few rows injects a single
// upset in a parity cell, a 4-cell burst in one die row and a double upset of
// one word in two adjacent dies, and checks the error flag of every word of
// the row against the expectation: detected, detected, missed.
module tb_bp3d_edc_sram_full;
  localparam int unsigned N = 4, K = 4, W = 128, ROWS = 4096, LINE = 516, DB = 129;
  localparam int unsigned WORDS = ROWS * N;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              wr_en = 1'b0, rd_en = 1'b0, tst_wr_en = 1'b0;
  logic [13:0]       wr_addr = '0, rd_addr = '0;
  logic [W-1:0]      wr_data = '0, rd_data;
  logic [0:0]        rd_parity, rd_syndrome;
  logic              rd_valid, rd_err;
  logic [LINE-1:0]   rd_line;
  logic [11:0]       tst_row = '0;
  logic [LINE-1:0]   tst_mask = '0, tst_data = '0;

  logic [W-1:0]      ref_data [WORDS];
  int checks = 0, failures = 0;
  int n_single = 0, n_burst = 0, n_cross_miss = 0;

  bp3d_edc_sram dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // read all four words of a row; expected error flag per word in exp_err
  task automatic read_row(input int unsigned r, input logic [N-1:0] exp_err, input int kind);
    for (int unsigned w = 0; w <= N; w++) begin
      @(negedge clk);
      if (w > 0) begin
        chk(rd_valid, "rd_valid");
        chk(rd_err == exp_err[w-1], $sformatf("row %0d word %0d err=%b expected %b", r, w-1, rd_err, exp_err[w-1]));
        if (rd_err && exp_err[w-1] && kind == 1) n_single++;
        if (rd_err && exp_err[w-1] && kind == 2) n_burst++;
      end
      rd_en   = (w < N);
      rd_addr = 14'((r << 2) | (w % N));
    end
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  task automatic flip(input int unsigned r, input logic [LINE-1:0] f);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = 14'(r << 2);   // fetch the row to know its contents
    @(negedge clk);
    rd_en = 1'b0;
    tst_wr_en = 1'b1; tst_row = 12'(r); tst_mask = f; tst_data = ~rd_line;
    @(negedge clk);
    tst_wr_en = 1'b0;
  endtask

  initial begin
    logic [LINE-1:0] f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // write every word
    for (int unsigned a = 0; a < WORDS; a++) begin
      @(negedge clk);
      ref_data[a] = {$urandom, $urandom, $urandom, $urandom};
      wr_en = 1'b1; wr_addr = 14'(a); wr_data = ref_data[a];
    end
    @(negedge clk);
    wr_en = 1'b0;
    // read every word back, one per cycle
    for (int unsigned a = 0; a <= WORDS; a++) begin
      @(negedge clk);
      if (a > 0) begin
        chk(rd_valid && rd_data === ref_data[a-1] && !rd_err,
            $sformatf("word %0d read %h err %b expected %h", a-1, rd_data, rd_err, ref_data[a-1]));
        // stored parity is the XOR of the word
        chk(rd_parity[0] === ^ref_data[a-1], "stored parity");
      end
      rd_en = (a < WORDS); rd_addr = 14'(a % WORDS);
    end
    @(negedge clk);
    rd_en = 1'b0;
    chk(!rd_valid, "rd_valid drops after the last read");

    for (int unsigned i = 0; i < 8; i++) begin
      automatic int unsigned r = (i * 521 + 7) % ROWS;
      // single upset in the parity cell of word (i % 4): last die, cells 512..515
      f = '0; f[512 + (i % N)] = 1'b1;
      flip(r, f);
      read_row(r, N'(1) << (i % N), 1);
      flip(r, f);                              // restore
      read_row(r, '0, 0);
      // 4-cell burst inside die (i % 4): one upset in each of the 4 words
      f = '0;
      for (int unsigned k = 0; k < 4; k++) f[(i % K) * DB + 40 + i + k] = 1'b1;
      flip(r, f);
      read_row(r, 4'b1111, 2);
      flip(r, f);
      // bit 31 and bit 32 of word 1: cells 125 (die 0) and 129 (die 1)
      f = '0; f[31 * N + 1] = 1'b1; f[32 * N + 1] = 1'b1;
      flip(r, f);
      read_row(r, '0, 3);
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 14'((r << 2) | 1);
      @(negedge clk);
      rd_en = 1'b0;
      chk(rd_data === (ref_data[r * N + 1] ^ (W'(3) << 31)), "double upset corrupts word 1 unnoticed");
      if (!rd_err && rd_data !== ref_data[r * N + 1]) n_cross_miss++;
      flip(r, f);
      read_row(r, '0, 0);
    end
    $display("detected single=%0d burst=%0d; cross-die double upsets missed=%0d",
             n_single, n_burst, n_cross_miss);
    chk(n_single == 8 && n_burst == 32 && n_cross_miss == 8, "every injected case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
