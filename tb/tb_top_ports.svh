// tb_top_ports.svh: signals connecting an end-to-end testbench to
// bi_analytics_top (matched by name with .*).
  logic              bic_start, bic_ready, bic_done;
  logic [31:0]       bic_ops_base, bic_data_base, bic_out_base, bic_cycles;
  logic [15:0]       bic_ops_count, bic_batches;
  logic              bic_mem_rd_req, bic_mem_rd_ready, bic_mem_rd_valid, bic_mem_wr_req, bic_mem_wr_ready;
  logic [31:0]       bic_mem_rd_addr, bic_mem_wr_addr;
  logic [255:0]      bic_mem_rd_data, bic_mem_wr_data;
  logic              biqp_start, biqp_ready, biqp_done, biqp_enc_en;
  logic [31:0]       biqp_ops_base, biqp_bim_base, biqp_out_base, biqp_cycles, biqp_matches;
  logic [15:0]       biqp_ops_count, biqp_nb, biqp_batches;
  logic              biqp_mem_rd_req, biqp_mem_rd_ready, biqp_mem_rd_valid, biqp_mem_wr_req, biqp_mem_wr_ready;
  logic [31:0]       biqp_mem_rd_addr, biqp_mem_wr_addr;
  logic [255:0]      biqp_mem_rd_data, biqp_mem_wr_data;
