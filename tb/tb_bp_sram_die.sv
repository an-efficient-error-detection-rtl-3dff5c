// tb_bp_sram_die -- self-checking test of one die array.
// Random bit-masked writes and reads against a reference copy kept in the
// testbench; checks the one-cycle read latency, that masked-off cells keep
// their contents, and the read-first rule when a row is read and written in
// the same cycle.
module tb_bp_sram_die;
  localparam int unsigned ROWS = 16;
  localparam int unsigned BITS = 17;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            we = 1'b0, re = 1'b0;
  logic [3:0]      wr_row = '0, rd_row = '0;
  logic [BITS-1:0] wr_mask = '0, wr_data = '0;
  logic [BITS-1:0] rd_q;

  logic [BITS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  bp_sram_die #(.ROWS(ROWS), .BITS(BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [BITS-1:0] got, input logic [BITS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(rd_q, '0, "read register after reset");
    // fill every row with a full-mask write
    for (int r = 0; r < ROWS; r++) begin
      we <= 1'b1; wr_row <= 4'(r); wr_mask <= '1;
      wr_data <= BITS'($urandom) ^ BITS'(r * 3);
      @(posedge clk);
      ref_mem[r] = wr_data;
    end
    we <= 1'b0;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      logic [BITS-1:0] exp_q;
      logic            do_rd;
      int              rr;
      we      <= 1'($urandom);
      wr_row  <= 4'($urandom);
      wr_mask <= BITS'($urandom);
      wr_data <= BITS'($urandom);
      do_rd    = 1'($urandom);
      rr       = int'($urandom % ROWS);
      re      <= do_rd;
      rd_row  <= 4'(rr);
      #1;
      exp_q = ref_mem[rr];       // read-first: value before this edge's write
      @(posedge clk);
      if (we) begin
        for (int b = 0; b < BITS; b++)
          if (wr_mask[b]) ref_mem[wr_row][b] = wr_data[b];
      end
      #1;
      if (do_rd) check(rd_q, exp_q, $sformatf("read row %0d (iteration %0d)", rr, i));
    end
    // read data must be held while re is low
    we <= 1'b0; re <= 1'b1; rd_row <= 4'd3;
    @(posedge clk);
    re <= 1'b0; rd_row <= 4'd4;
    repeat (3) @(posedge clk);
    #1 check(rd_q, ref_mem[3], "read data held while re=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
