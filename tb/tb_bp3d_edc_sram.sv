// tb_bp3d_edc_sram -- end-to-end test of the 3D bit-partitioned SRAM with
// interleaved parity, at reduced sizes, in three configurations:
//   * N = K = 4 with one parity bit per word (the four-die example layout,
//     16-bit words, 17 cells per die row),
//   * the same with two parity sets (odd and even dies),
//   * N = K = 8 with one parity bit per word.
// Each runs the harness: random traffic, single upsets, in-die bursts and
// cross-die double upsets, all checked against a reference model.
module tb_bp3d_edc_sram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int   chk_a, chk_b, chk_c, fail_a, fail_b, fail_c;
  int   checks, failures;

  edc_sram_harness #(.N_WAYS(4), .K_DIES(4), .DDB(16), .ROWS(16), .SETS(1)) h_a (
    .clk(clk), .done(done_a), .checks(chk_a), .failures(fail_a));
  edc_sram_harness #(.N_WAYS(4), .K_DIES(4), .DDB(16), .ROWS(16), .SETS(2)) h_b (
    .clk(clk), .done(done_b), .checks(chk_b), .failures(fail_b));
  edc_sram_harness #(.N_WAYS(8), .K_DIES(8), .DDB(8),  .ROWS(16), .SETS(1)) h_c (
    .clk(clk), .done(done_c), .checks(chk_c), .failures(fail_c));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c,
             fail_a + fail_b + fail_c + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done_a && done_b && done_c);
    checks   = chk_a + chk_b + chk_c;
    failures = fail_a + fail_b + fail_c;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
