// tb_parity_checker -- self-checking test of the read-side parity check.
// A word with its correct parity gives no error; one flipped data or parity
// bit is detected; two flipped bits under the same parity bit are not (the
// limit of a single parity bit). With two parity sets, two flips in cells of
// different sets are both reported in the syndrome.
module tb_parity_checker;
  localparam int unsigned N = 4;
  localparam int unsigned W = 128;

  logic [1:0]   sel;
  logic [W-1:0] data;
  logic [0:0]   par, syn;
  logic         err;
  int checks = 0, failures = 0;

  // two-set instance on the 16-bit-word layout (18-cell die rows)
  logic [1:0]  sel2;
  logic [15:0] data2;
  logic [1:0]  par2, syn2;
  logic        err2;

  parity_checker #(.N_WAYS(N), .W(W), .SETS(1), .DIE_BITS(129)) dut (
    .word_sel(sel), .data(data), .parity(par), .syndrome(syn), .err(err));
  parity_checker #(.N_WAYS(N), .W(16), .SETS(2), .DIE_BITS(18)) dut2 (
    .word_sel(sel2), .data(data2), .parity(par2), .syndrome(syn2), .err(err2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_err(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: err=%b expected %b", what, got, exp); end
  endtask

  function automatic logic xor_all(input logic [W-1:0] d);
    logic p = 1'b0;
    for (int b = 0; b < W; b++) p ^= d[b];
    return p;
  endfunction

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int b1, b2;
      logic [W-1:0] good;
      logic         gp;
      sel  = 2'($urandom);
      good = {$urandom, $urandom, $urandom, $urandom};
      gp   = xor_all(good);
      data = good; par = gp; #1;
      expect_err(err, 1'b0, "clean word");
      b1 = int'($urandom % W);
      data = good ^ (W'(1) << b1); #1;
      expect_err(err, 1'b1, "single data-bit flip");
      data = good; par = ~gp; #1;
      expect_err(err, 1'b1, "parity-cell flip");
      b2 = (b1 + 1 + int'($urandom % (W - 1))) % W;
      data = good ^ (W'(1) << b1) ^ (W'(1) << b2); par = gp; #1;
      expect_err(err, 1'b0, "double flip under one parity bit is invisible");
    end
    // two sets, word 0: bit 0 is in die 0 (set 0), bit 5 in die 1 (set 1)
    sel2 = 2'd0; data2 = 16'h0000; par2 = 2'b00; #1;
    expect_err(err2, 1'b0, "two-set clean word");
    data2 = 16'h0021; #1;
    expect_err(err2, 1'b1, "two-set double flip across dies");
    checks++;
    if (syn2 !== 2'b11) begin failures++; $display("FAIL syndrome %b", syn2); end
    data2 = 16'h0003; #1;   // bits 0 and 1: both in die 0
    expect_err(err2, 1'b0, "two-set double flip in one die");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
