// tb_parity_gen -- self-checking test of parity generation.
// Configuration A: one parity bit per 128-bit word (N = K = 4, 129-cpos die
// rows), compared with a population count. Configuration B: two parity sets
// on the small 16-bit-word layout (N = K = 4, 18-cpos die rows); the expected
// set of every bit is found by walking the interleaved line cpos by cpos and
// counting dies, independently of the module's arithmetic.
module tb_parity_gen;
  localparam int unsigned N  = 4;
  localparam int unsigned WA = 128;
  localparam int unsigned WB = 16;
  localparam int unsigned DB = 18;   // (4*16 + 2*4)/4

  logic [1:0]    sel_a, sel_b;
  logic [WA-1:0] data_a;
  logic [WB-1:0] data_b;
  logic [0:0]    par_a;
  logic [1:0]    par_b;
  int checks = 0, failures = 0;

  parity_gen #(.N_WAYS(N), .W(WA), .SETS(1), .DIE_BITS(129)) dut_a (
    .word_sel(sel_a), .data(data_a), .parity(par_a));
  parity_gen #(.N_WAYS(N), .W(WB), .SETS(2), .DIE_BITS(DB)) dut_b (
    .word_sel(sel_b), .data(data_b), .parity(par_b));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // set (die parity) of bit b of word w in configuration B, by walking the line
  function automatic int set_of(int w, int b);
    int die = 0, cpos = 0;
    for (int bit_i = 0; bit_i < WB; bit_i++) begin
      for (int word_i = 0; word_i < N; word_i++) begin
        if (word_i == w && bit_i == b) return die % 2;
        cpos++;
        if (cpos == DB) begin cpos = 0; die++; end
      end
    end
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int ones;
      int ones_set [2];
      sel_a  = 2'($urandom); sel_b = 2'($urandom);
      data_a = {$urandom, $urandom, $urandom, $urandom};
      if (i < 128) data_a = WA'(1) << i;          // walking one
      data_b = WB'($urandom);
      #1;
      ones = 0;
      for (int b = 0; b < WA; b++) ones += int'(data_a[b]);
      checks++;
      if (par_a[0] !== 1'(ones % 2)) begin
        failures++;
        $display("FAIL A: data %h parity %b", data_a, par_a);
      end
      ones_set[0] = 0; ones_set[1] = 0;
      for (int b = 0; b < WB; b++) if (data_b[b]) ones_set[set_of(int'(sel_b), b)]++;
      checks++;
      if (par_b !== {1'(ones_set[1] % 2), 1'(ones_set[0] % 2)}) begin
        failures++;
        $display("FAIL B: word %0d data %h parity %b", sel_b, data_b, par_b);
      end
    end
    // hand-checked: word 0 bits 0..4 lie in die 0 (set 0), bit 5 starts die 1
    // (cells 18..35 hold bits 4.5..8.x), so bit 5 of word 0 is in set 1
    sel_b = 2'd0; data_b = 16'h0020; #1;
    checks++;
    if (par_b !== 2'b10) begin failures++; $display("FAIL B: bit 5 of word 0 not in set 1"); end
    sel_b = 2'd0; data_b = 16'h0010; #1;
    checks++;
    if (par_b !== 2'b01) begin failures++; $display("FAIL B: bit 4 of word 0 not in set 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
