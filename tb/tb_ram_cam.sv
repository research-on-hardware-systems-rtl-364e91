// tb_ram_cam: self-checking test of the RAM-based CAM (ram_cam with its
// cam_unit cells) at 1024 x 16 bits (2 CAM blocks of 16 lanes). Clears the
// CAM with the row sweep, loads a batch (16 words per beat), reads the BI
// vector of every value used and of absent keys and compares with a
// reference built from the data; then erases the batch by replaying it with
// set = 0, loads a second batch and checks again, which shows that no stale
// index survives. Also checks the one-cycle read latency and that the
// output holds while rd_en is low.
module tb_ram_cam;
  localparam int NW = 1024, WW = 16, BUS = 256, LANES = BUS / WW, BEATS = NW / LANES;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_set = 0, clr_en = 0, rd_en = 0;
  logic [5:0] wr_beat;
  logic [BUS-1:0] wr_data;
  logic [7:0] clr_row;
  logic [WW-1:0] rd_key;
  logic [NW-1:0] rd_vec;

  ram_cam #(.NWORDS(NW), .WORD_W(WW), .SEG_W(8), .CU_DEPTH(32), .BUS_W(BUS)) dut (
    .clk, .wr_en, .wr_beat, .wr_data, .wr_set, .clr_en, .clr_row, .rd_en, .rd_key, .rd_vec);

  logic [WW-1:0] vals [8];
  logic [WW-1:0] words [NW];

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  task automatic load(input bit set);
    for (int b = 0; b < BEATS; b++) begin
      @(negedge clk);
      wr_en = 1; wr_set = set; wr_beat = 6'(b);
      for (int l = 0; l < LANES; l++) wr_data[l*WW +: WW] = words[b*LANES + l];
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic check_key(input logic [WW-1:0] key);
    logic [NW-1:0] expv;
    for (int n = 0; n < NW; n++) expv[n] = (words[n] == key);
    @(negedge clk); rd_en = 1; rd_key = key;
    @(negedge clk); rd_en = 0; rd_key = ~key;
    checks++;
    if (rd_vec != expv) fail($sformatf("key %h vector mismatch", key));
    @(negedge clk);
    checks++;
    if (rd_vec != expv) fail("output not held with rd_en low");
  endtask

  task automatic new_batch(input int seed);
    for (int i = 0; i < 8; i++) vals[i] = WW'($urandom);
    // two values that share a byte, so the per-byte AND matters
    vals[1] = {vals[0][15:8], vals[1][7:0]};
    vals[2] = {vals[2][15:8], vals[0][7:0]};
    for (int n = 0; n < NW; n++) words[n] = vals[$urandom % 8];
  endtask

  initial begin
    for (int r = 0; r < 256; r++) begin
      @(negedge clk); clr_en = 1; clr_row = 8'(r);
    end
    @(negedge clk); clr_en = 0;
    new_batch(1);
    load(1);
    for (int i = 0; i < 8; i++) check_key(vals[i]);
    check_key(vals[0] ^ 16'h0101);
    // erase by replay, then load another batch
    load(0);
    new_batch(2);
    load(1);
    for (int i = 0; i < 8; i++) check_key(vals[i]);
    check_key(~vals[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
