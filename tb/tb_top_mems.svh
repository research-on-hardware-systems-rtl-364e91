// tb_top_mems.svh: the two external memories of the analytics system
// (behavioural models), one per accelerator.
  ddr_model bmem (.clk, .rst_n, .stall_en, .rd_req(bic_mem_rd_req), .rd_addr(bic_mem_rd_addr),
    .rd_ready(bic_mem_rd_ready), .rd_valid(bic_mem_rd_valid), .rd_data(bic_mem_rd_data),
    .wr_req(bic_mem_wr_req), .wr_addr(bic_mem_wr_addr), .wr_data(bic_mem_wr_data), .wr_ready(bic_mem_wr_ready));
  ddr_model qmem (.clk, .rst_n, .stall_en, .rd_req(biqp_mem_rd_req), .rd_addr(biqp_mem_rd_addr),
    .rd_ready(biqp_mem_rd_ready), .rd_valid(biqp_mem_rd_valid), .rd_data(biqp_mem_rd_data),
    .wr_req(biqp_mem_wr_req), .wr_addr(biqp_mem_wr_addr), .wr_data(biqp_mem_wr_data), .wr_ready(biqp_mem_wr_ready));
