// tb_particle_strike -- particle-strike detection campaign on the full-size
// 256 KB memory (4096 rows, one 64-byte line per physical row) in six
// configurations: N = K = 4, 8 and 16 (128-, 64- and 32-bit die rows), each
// with one parity bit per word and with two parity sets (odd/even dies).
// 10,000 particles per configuration. Every read of a struck row is checked
// against the parity of its upset cells; the detection rates of the design
// and of per-die parity are printed.
module tb_particle_strike;
  localparam int NCFG = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fail [NCFG];

  particle_strike_harness #(.N_WAYS(4),  .K_DIES(4),  .DDB(128), .SETS(1)) h_4  (
    .clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  particle_strike_harness #(.N_WAYS(8),  .K_DIES(8),  .DDB(64),  .SETS(1)) h_8  (
    .clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  particle_strike_harness #(.N_WAYS(16), .K_DIES(16), .DDB(32),  .SETS(1)) h_16 (
    .clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  particle_strike_harness #(.N_WAYS(4),  .K_DIES(4),  .DDB(128), .SETS(2)) h_4e (
    .clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  particle_strike_harness #(.N_WAYS(8),  .K_DIES(8),  .DDB(64),  .SETS(2)) h_8e (
    .clk(clk), .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  particle_strike_harness #(.N_WAYS(16), .K_DIES(16), .DDB(32),  .SETS(2)) h_16e (
    .clk(clk), .done(done[5]), .checks(chk[5]), .failures(fail[5]));

  function automatic int total(input int a [NCFG]);
    int t = 0;
    foreach (a[i]) t += a[i];
    return t;
  endfunction

  initial begin : watchdog
    repeat (50000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end
endmodule
