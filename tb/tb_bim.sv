// tb_bim: self-checking test of the bitmap index memory (bim with its bimu
// units) at 16 rows of 1024 bits (4 units). Loads every row in the
// {row, select} order of the loading table, reads all rows back, writes a
// row through the LD port and reads it, and checks that an LD and a DMA
// write to the same place in one cycle leave the LD data. Also checks the
// one-cycle read latency and the hold with rd_en low.
module tb_bim;
  localparam int ROWS = 16, NB = 1024, BUS = 256, U = NB / BUS;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wen = 0, ld_en = 0, rd_en = 0;
  logic [5:0] addr;
  logic [BUS-1:0] data_a;
  logic [3:0] ld_row, rd_row;
  logic [NB-1:0] update, index;
  logic [NB-1:0] refm [ROWS];

  bim #(.ROWS(ROWS), .NBITS(NB), .BUS_W(BUS)) dut (.clk, .wen, .addr, .data_a, .ld_en, .ld_row,
    .update, .rd_en, .rd_row, .index);

  task automatic rd_check(input int r, input string what);
    @(negedge clk); rd_en = 1; rd_row = 4'(r);
    @(negedge clk); rd_en = 0; rd_row = 4'(r + 1);
    checks++;
    if (index != refm[r]) begin failures++; $display("FAIL %s row %0d", what, r); end
    @(negedge clk);
    checks++;
    if (index != refm[r]) begin failures++; $display("FAIL hold row %0d", r); end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < NB / 32; w++) refm[r][w*32 +: 32] = $urandom;
    for (int c = 0; c < ROWS * U; c++) begin
      @(negedge clk); wen = 1; addr = 6'(c);
      data_a = refm[c / U][(c % U)*BUS +: BUS];
    end
    @(negedge clk); wen = 0;
    for (int r = 0; r < ROWS; r++) rd_check(r, "load");
    // LD of a whole row
    for (int w = 0; w < NB / 32; w++) update[w*32 +: 32] = $urandom;
    @(negedge clk); ld_en = 1; ld_row = 4'd5;
    @(negedge clk); ld_en = 0;
    refm[5] = update;
    rd_check(5, "ld");
    rd_check(6, "neighbour");
    // LD and DMA write to the same row in the same cycle
    for (int w = 0; w < NB / 32; w++) update[w*32 +: 32] = $urandom;
    @(negedge clk); ld_en = 1; ld_row = 4'd9; wen = 1; addr = {4'd9, 2'd1}; data_a = '1;
    @(negedge clk); ld_en = 0; wen = 0;
    refm[9] = update;
    rd_check(9, "ld priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
