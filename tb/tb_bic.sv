// tb_bic: self-checking test of the bitmap index creator with its DMA,
// OPM, CAM and QLA, at 1024 words of 16 bits and 64 operations, against the
// behavioural memory. A job of three batches runs range queries written as
// OR / NO / EQ operation lists (including back-to-back EQs that must stall on
// the output FIFO); every BI vector written to memory is compared with one
// computed from the data. The first job runs without memory stalls and its
// cycle count is compared with the timing model
// T = t_OPM + (t_CAM + t_QLA + t_OUT) * B; a second job with random memory
// stalls checks correctness, and that the CAM is cleared between jobs.
module tb_bic;
  localparam int NW = 1024, BUS = 256, LANES = 16, BEATS = NW / LANES, VB = NW / BUS, NOPS = 64;
  int checks = 0, failures = 0, n_stall = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, ready, done, stall_en = 0;
  logic [31:0] cycles;
  logic [15:0] ops_count, batches;
  logic mem_rd_req, mem_rd_ready, mem_rd_valid, mem_wr_req, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr;
  logic [255:0] mem_rd_data, mem_wr_data;

  bic #(.NWORDS(NW), .NOPS(NOPS)) dut (.clk, .rst_n, .start, .ops_base(32'd0), .ops_count,
    .data_base(32'd100), .batches, .out_base(32'd4000), .ready, .done, .cycles,
    .mem_rd_req, .mem_rd_addr, .mem_rd_ready, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_ready);
  ddr_model mem (.clk, .rst_n, .stall_en, .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_ready(mem_rd_ready),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data), .wr_req(mem_wr_req), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_ready(mem_wr_ready));

  always @(posedge clk) if (dut.stall) n_stall++;

  logic [15:0] words [3][NW];
  logic [31:0] ops [$];

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // value range [lo, hi] as OR of keys, optional NOT, then EQ
  task automatic add_range(input int lo, input int hi, input bit neg);
    for (int k = lo; k <= hi; k++) ops.push_back(bi_pkg::bic_op(16'(k), 1, 0, 0));
    if (neg) ops.push_back(bi_pkg::bic_op(16'd0, 0, 1, 0));
    ops.push_back(bi_pkg::bic_op(16'd0, 0, 0, 1));
  endtask

  task automatic run_job(input int nb, input int seed);
    int nvec, exp_theo, lo_bound;
    logic [NW-1:0] expv, got, acc;
    for (int b = 0; b < nb; b++) begin
      for (int n = 0; n < NW; n++) words[b][n] = 16'(10 + $urandom % 50) + 16'(seed * 1000);
      for (int w = 0; w < BEATS; w++) begin
        logic [255:0] d;
        for (int l = 0; l < LANES; l++) d[l*16 +: 16] = words[b][w*LANES + l];
        mem.poke(32'(100 + b*BEATS + w), d);
      end
    end
    ops = {};
    add_range(seed*1000 + 19, seed*1000 + 20, 0);
    add_range(seed*1000 + 29, seed*1000 + 31, 0);
    add_range(seed*1000 + 39, seed*1000 + 39, 1);
    ops.push_back(bi_pkg::bic_op(16'd0, 0, 0, 1));   // back-to-back EQ: empty result
    add_range(seed*1000 + 45, seed*1000 + 50, 0);
    for (int i = 0; i < (ops.size() + 7) / 8; i++) begin
      logic [255:0] d;
      d = '0;
      for (int k = 0; k < 8; k++) if (i*8 + k < ops.size()) d[k*32 +: 32] = ops[i*8 + k];
      mem.poke(32'(i), d);
    end
    ops_count = 16'(ops.size()); batches = 16'(nb);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    // compare every vector
    nvec = 0;
    for (int b = 0; b < nb; b++) begin
      acc = '0;
      foreach (ops[i]) begin
        if (ops[i][0]) for (int n = 0; n < NW; n++) if (words[b][n] == ops[i][31:16]) acc[n] = 1'b1;
        if (ops[i][1]) acc = ~acc;
        if (ops[i][2]) begin
          expv = acc; acc = '0;
          for (int w = 0; w < VB; w++) got[w*BUS +: BUS] = mem.peek(32'(4000 + nvec*VB + w));
          checks++;
          if (got != expv) fail($sformatf("job %0d batch %0d vector %0d", seed, b, nvec));
          nvec++;
        end
      end
    end
    // document's model: t_OPM + (t_CAM + t_QLA + t_OUT) * B
    exp_theo = (ops.size() + 7) / 8 + (2*BEATS + ops.size() + VB*5) * nb;
    // this design: the 256-row sweep overlaps t_OPM and replaces the first
    // clear; outputs overlap the next batch. Allow DMA latency per transfer
    // and the FIFO wait of the back-to-back EQ.
    lo_bound = ((ops.size() + 7) / 8 > 256 ? (ops.size() + 7) / 8 : 256)
             + BEATS * (2*nb - 1) + ops.size() * nb;
    $display("job %0d: %0d cycles, document's model %0d, this design's minimum %0d",
             seed, cycles, exp_theo, lo_bound);
    if (!stall_en) begin
      checks++;
      if (int'(cycles) < lo_bound || int'(cycles) > lo_bound + 15*2*nb + VB*5*nb)
        fail($sformatf("cycle count %0d outside [%0d, %0d]", cycles, lo_bound, lo_bound + 15*2*nb + VB*5*nb));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_job(3, 1);
    stall_en = 1;
    run_job(2, 2);
    checks++;
    if (n_stall == 0) fail("no EQ stall seen");
    $display("EQ stall cycles %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
