// tb_word_selector -- self-checking test of the N-to-1 read multiplexers.
// Small layout of the four-die example (N = K = 4, 16-bit words, 68-cpos
// line). A random line is read for every word; the expected word is gathered
// by walking the line with a running cpos counter. Also checks the cells
// printed in the four-die figure (bit 4 of word 1 is the first cpos of die 2,
// the parity bits are the last four cells of die 4).
module tb_word_selector;
  localparam int unsigned N = 4, W = 16, LINE = 68;

  logic [LINE-1:0] line;
  logic [1:0]      sel;
  logic [W-1:0]    data;
  logic [0:0]      par;
  int checks = 0, failures = 0;

  word_selector #(.N_WAYS(N), .W(W), .SETS(1)) dut (
    .line(line), .word_sel(sel), .data(data), .parity(par));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] exp_d;
      int cpos;
      line = {4'($urandom), $urandom, $urandom};
      sel  = 2'($urandom);
      cpos = 0;
      for (int b = 0; b < W; b++)
        for (int w = 0; w < N; w++) begin
          if (w == int'(sel)) exp_d[b] = line[cpos];
          cpos++;
        end
      #1;
      checks++;
      if (data !== exp_d || par[0] !== line[64 + int'(sel)]) begin
        failures++;
        $display("FAIL line %h word %0d: got %h/%b expected %h/%b", line, sel, data, par, exp_d, line[64 + int'(sel)]);
      end
    end
    line = '0; line[17] = 1'b1; sel = 2'd1; #1;
    checks++;
    if (data !== 16'h0010) begin failures++; $display("FAIL first cpos of die 2: %h", data); end
    line = '0; line[67] = 1'b1; sel = 2'd3; #1;
    checks++;
    if (par !== 1'b1 || data !== '0) begin failures++; $display("FAIL p3 cpos"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
