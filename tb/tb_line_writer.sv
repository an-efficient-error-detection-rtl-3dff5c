// tb_line_writer -- self-checking test of the write-path interleaving.
// Small layout of the document's four-die example: N = K = 4, 16-bit words,
// 64 data cells plus 4 parity cells in a 68-cell line, 17 cells per die.
// Checks (1) cell labels printed in the four-die example: die 1 ends with
// bit 4 of word 0, die 2 starts with bit 4 of word 1 and ends with bit 8 of
// word 1, die 3 starts with bit 8 of word 2 and ends with bit 12 of word 2,
// die 4 starts with bit 12 of word 3 and ends with p0..p3; (2) with a walking
// one every bit lands in exactly one cell and the mask selects only the
// cells of the addressed word.
module tb_line_writer;
  localparam int unsigned N = 4, W = 16, LINE = 68;

  logic [1:0]      sel;
  logic [W-1:0]    data;
  logic [0:0]      par;
  logic [LINE-1:0] ld, lm;
  int checks = 0, failures = 0;

  line_writer #(.N_WAYS(N), .W(W), .SETS(1)) dut (
    .word_sel(sel), .data(data), .parity(par), .line_data(ld), .line_mask(lm));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cell(input int w, input int b, input int pos);
    // b < 0 means parity bit of word w
    sel = 2'(w); data = '0; par = '0;
    if (b < 0) par = 1'b1; else data[b] = 1'b1;
    #1;
    checks++;
    if ((ld & lm) !== (LINE'(1) << pos)) begin
      failures++;
      $display("FAIL word %0d bit %0d: expected cell %0d, got %h", w, b, pos, ld & lm);
    end
  endtask

  initial begin
    // labels printed in the proposed-layout figure
    check_cell(0, 0, 0);   check_cell(3, 3, 15);  check_cell(0, 4, 16);
    check_cell(1, 4, 17);  check_cell(0, 5, 20);  check_cell(1, 8, 33);
    check_cell(2, 8, 34);  check_cell(2, 12, 50); check_cell(3, 12, 51);
    check_cell(0, 13, 52); check_cell(3, 15, 63);
    check_cell(0, -1, 64); check_cell(1, -1, 65); check_cell(2, -1, 66); check_cell(3, -1, 67);
    // walking one over every word and bit, cell index from a running counter
    for (int w = 0; w < N; w++) begin
      automatic int pos = w;
      for (int b = 0; b < W; b++) begin
        check_cell(w, b, pos);
        pos += N;
      end
      // mask covers exactly W data cells + 1 parity cell, none of another word
      sel = 2'(w); data = '1; par = '1; #1;
      checks++;
      if ($countones(lm) != W + 1 || (ld & lm) !== lm) begin
        failures++; $display("FAIL mask of word %0d: %h", w, lm);
      end
      for (int p = 0; p < LINE; p++) begin
        if (lm[p] && (p % N) != w) begin
          failures++; $display("FAIL mask of word %0d covers cell %0d", w, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
