// tb_bi_dma: self-checking test of the three-channel DMA against the
// behavioural memory model with random controller stalls. Starts channel 1
// and, while it runs, channel 0 (which must wait and then run); checks
// every returned word and its index, that data arrives only on the started
// channel, and writes a stream through channel 2 to consecutive addresses.
module tb_bi_dma;
  int checks = 0, failures = 0, n_wait = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] rd_start = 0, rd_busy, rd_valid;
  logic [1:0][31:0] rd_base;
  logic [1:0][23:0] rd_len;
  logic [255:0] rd_data, wr_data;
  logic [23:0] rd_idx;
  logic wr_start = 0, wr_valid = 0, wr_ready;
  logic [31:0] wr_base;
  logic mem_rd_req, mem_rd_ready, mem_rd_valid, mem_wr_req, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr;
  logic [255:0] mem_rd_data, mem_wr_data;

  bi_dma dut (.clk, .rst_n, .rd_start, .rd_base, .rd_len, .rd_busy, .rd_valid, .rd_data, .rd_idx,
    .wr_start, .wr_base, .wr_valid, .wr_data, .wr_ready,
    .mem_rd_req, .mem_rd_addr, .mem_rd_ready, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_ready);
  ddr_model mem (.clk, .rst_n, .stall_en(1'b1), .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_ready(mem_rd_ready),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data), .wr_req(mem_wr_req), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_ready(mem_wr_ready));

  function automatic logic [255:0] pat(input int a);
    return {8{32'(a) ^ 32'h5a5a0000}};
  endfunction

  int cnt [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) if (rd_valid[c]) begin
      int base;
      base = (c == 0) ? 1000 : 2000;
      checks++;
      if (rd_data != pat(base + cnt[c]) || rd_idx != 24'(cnt[c])) begin
        failures++; $display("FAIL ch%0d word %0d", c, cnt[c]);
      end
      cnt[c]++;
    end
    if (rd_busy[0] && rd_busy[1]) n_wait++;
  end

  initial begin
    for (int a = 0; a < 100; a++) begin mem.poke(32'(1000 + a), pat(1000 + a)); mem.poke(32'(2000 + a), pat(2000 + a)); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_base[1] = 2000; rd_len[1] = 77; rd_start = 2'b10;
    @(negedge clk); rd_start = 0;
    repeat (5) @(negedge clk);
    rd_base[0] = 1000; rd_len[0] = 40; rd_start = 2'b01;
    @(negedge clk); rd_start = 0;
    wait (rd_busy == 0);
    checks++; if (cnt[0] != 40) begin failures++; $display("FAIL ch0 count %0d", cnt[0]); end
    checks++; if (cnt[1] != 77) begin failures++; $display("FAIL ch1 count %0d", cnt[1]); end
    checks++; if (n_wait == 0) begin failures++; $display("FAIL ch0 never waited"); end
    // write channel
    @(negedge clk); wr_start = 1; wr_base = 5000;
    @(negedge clk); wr_start = 0;
    // wr_ready only changes at posedge, so its value at the negedge decides
    // whether the next posedge accepts the word
    for (int i = 0; i < 30; i++) begin
      bit acc;
      wr_valid = 1; wr_data = pat(7000 + i);
      do begin acc = wr_ready; @(negedge clk); end while (!acc);
    end
    wr_valid = 0;
    @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (mem.peek(32'(5000 + i)) != pat(7000 + i)) begin failures++; $display("FAIL write %0d", i); end
    end
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
