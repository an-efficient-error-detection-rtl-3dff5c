// tb_fig8_campaign -- 100,000 particle strikes on the default memory
// (N = K = 4, 4096 x 128-bit die rows, one parity bit per word), reported in
// ten batches of 10,000 particles. Each batch prints the share of particles
// whose corrupted words were all flagged, for this design and for per-die
// parity; every read of a struck row is checked against the reference.
module tb_fig8_campaign;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done;
  int   checks, failures;

  particle_strike_harness #(
    .N_WAYS(4), .K_DIES(4), .DDB(128), .ROWS(4096), .SETS(1),
    .PARTICLES(100000), .BATCH(10000)
  ) h (.clk(clk), .done(done), .checks(checks), .failures(failures));

  initial begin : watchdog
    repeat (100000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
