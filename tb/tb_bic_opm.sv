// tb_bic_opm: self-checking test of the BIC operation memory (64
// operations, 8 per beat): writes all rows, reads operations in order and
// at random, checks the one-cycle latency and the hold with rd_en low.
module tb_bic_opm;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_row;
  logic [255:0] wr_data;
  logic [5:0] rd_idx;
  logic [31:0] rd_op;
  logic [31:0] ref_ops [64];

  bic_opm #(.NOPS(64), .BUS_W(256)) dut (.clk, .wr_en, .wr_row, .wr_data, .rd_en, .rd_idx, .rd_op);

  initial begin
    for (int i = 0; i < 64; i++) ref_ops[i] = $urandom;
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); wr_en = 1; wr_row = 3'(r);
      for (int k = 0; k < 8; k++) wr_data[k*32 +: 32] = ref_ops[r*8 + k];
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 128; t++) begin
      int i;
      i = (t < 64) ? t : int'($urandom % 64);
      @(negedge clk); rd_en = 1; rd_idx = 6'(i);
      @(negedge clk); rd_en = 0; rd_idx = 6'(i + 1);
      checks++;
      if (rd_op != ref_ops[i]) begin
        failures++; $display("FAIL op %0d exp %h got %h", i, ref_ops[i], rd_op);
      end
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
