// tb_bi_analytics_top: end-to-end test of the analytics system at reduced
// size (1024 records, 16 BIM rows, 64-bit encoder segments). Runs the
// shared index-then-query flow (tb_top_body.svh) with memory stalls, then
// extra jobs that make every mechanism of the design happen: CAM clearing
// by replay between batches, the creator's output-FIFO stall, the query
// processor's EQ stall and LD forwarding, the encoder's output stall, the
// raw/encoded mode switch and a DMA channel waiting for the other. Each is
// counted and must occur at least once.
module tb_bi_analytics_top;
  localparam int NW = 1024, BIC_OPS_N = 64, ROWS_N = 16, BIQP_OPS_N = 64, SEG_N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall_en = 1;
`include "tb_top_ports.svh"

  bi_analytics_top #(.NWORDS(NW), .BIC_OPS(BIC_OPS_N), .BIM_ROWS(ROWS_N), .BIQP_OPS(BIQP_OPS_N),
                     .SEG_W(SEG_N)) dut (.*);
`include "tb_top_mems.svh"

  // mechanism counters
  int n_replay = 0, n_fifo_stall = 0, n_eq_stall = 0, n_fwd = 0, n_pos_stall = 0, n_mode = 0, n_dma_wait = 0;
  logic last_enc = 0;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_bic.cam_set && dut.u_bic.rd_valid[1]) n_replay++;
    if (dut.u_bic.stall) n_fifo_stall++;
    if (dut.u_biqp.stall) n_eq_stall++;
    if (dut.u_biqp.v2 && dut.u_biqp.u_qla.fwd_ld && dut.u_biqp.u_qla.fwd_row == dut.u_biqp.op2[15:7]) n_fwd++;
    if (dut.u_biqp.pos_valid && !dut.u_biqp.pos_ready) n_pos_stall++;
    if (biqp_start && biqp_ready && biqp_enc_en != last_enc) begin n_mode++; last_enc <= biqp_enc_en; end
    if ((bic_mem_rd_req && !bic_mem_rd_ready) || (biqp_mem_rd_req && !biqp_mem_rd_ready)) n_dma_wait++;
  end

`include "tb_top_body.svh"
    // ---- extra jobs for the remaining mechanisms ----
    begin
      logic [255:0] d;
      // creator: back-to-back EQs stall on the output FIFO
      d = '0;
      d[0 +: 32]  = bi_pkg::bic_op(16'd20, 1, 0, 0);
      d[32 +: 32] = bi_pkg::bic_op(16'd0, 0, 0, 1);
      d[64 +: 32] = bi_pkg::bic_op(16'd0, 0, 0, 1);
      bmem.poke(0, d);
      bic_job(3, 1, 110000);
      for (int k = 0; k < VB; k++) got[k*BUS +: BUS] = bmem.peek(32'(110000 + VB + k));
      checks++;
      if (got != '0) fail("second EQ must send an empty vector");
      // query processor: LD then read of the same row, EQ twice
      d = '0;
      d[0 +: 16]  = bi_pkg::biqp_op(9'd0, bi_pkg::Q_CR);
      d[16 +: 16] = bi_pkg::biqp_op(9'd1, bi_pkg::Q_NR);
      d[32 +: 16] = bi_pkg::biqp_op(9'd5, bi_pkg::Q_LD);
      d[48 +: 16] = bi_pkg::biqp_op(9'd5, bi_pkg::Q_XO);
      d[64 +: 16] = bi_pkg::biqp_op(9'd0, bi_pkg::Q_EQ);
      d[80 +: 16] = bi_pkg::biqp_op(9'd0, bi_pkg::Q_EQ);
      qmem.poke(0, d);
      biqp_job(6, 4, 1, 310000);
      checks++;
      if (qmem.peek(310000) != '1) fail("x XOR x must encode to an empty list");
    end
    $display("mechanisms: replay-clear %0d, FIFO stall %0d, EQ stall %0d, LD forward %0d, encoder stall %0d, mode switch %0d, memory back-pressure %0d",
             n_replay, n_fifo_stall, n_eq_stall, n_fwd, n_pos_stall, n_mode, n_dma_wait);
    checks++;
    if (n_replay == 0 || n_fifo_stall == 0 || n_eq_stall == 0 || n_fwd == 0 || n_pos_stall == 0 || n_mode == 0 || n_dma_wait == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
