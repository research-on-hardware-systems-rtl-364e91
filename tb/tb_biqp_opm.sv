// tb_biqp_opm: self-checking test of the query-processor operation memory
// (64 operations, 16 per beat): writes all rows, reads every operation in
// order and some at random, checks the one-cycle latency and the hold.
module tb_biqp_opm;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [1:0] wr_row;
  logic [255:0] wr_data;
  logic [5:0] rd_idx;
  logic [15:0] rd_op;
  logic [15:0] ref_ops [64];

  biqp_opm #(.NOPS(64), .BUS_W(256)) dut (.clk, .wr_en, .wr_row, .wr_data, .rd_en, .rd_idx, .rd_op);

  initial begin
    for (int i = 0; i < 64; i++) ref_ops[i] = 16'($urandom);
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); wr_en = 1; wr_row = 2'(r);
      for (int k = 0; k < 16; k++) wr_data[k*16 +: 16] = ref_ops[r*16 + k];
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 128; t++) begin
      int i;
      i = (t < 64) ? t : int'($urandom % 64);
      @(negedge clk); rd_en = 1; rd_idx = 6'(i);
      @(negedge clk); rd_en = 0; rd_idx = 6'(i + 3);
      checks++;
      if (rd_op != ref_ops[i]) begin failures++; $display("FAIL op %0d", i); end
      @(negedge clk);
      checks++;
      if (rd_op != ref_ops[i]) failures++;
    end
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
