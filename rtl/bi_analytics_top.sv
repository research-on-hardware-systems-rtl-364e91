// bi_analytics_top: bitmap-index analytics system with an encoder.
//
// Two independent accelerators side by side, each with its own
// memory-controller port, as in the two-board analytics system:
//   bic  - the bitmap index creator, which turns batches of 16-bit column
//          values into NWORDS-bit BI vectors, one per key range query;
//   biqp - the query processor, which combines BI vectors with bitwise
//          operations and stores the results either raw or, through its
//          bitmap index encoder, as lists of matching record numbers.
// BI vectors travel from the first memory to the second outside this module
// (through the host in the document's system), so the two parts share only
// the clock and reset. Job descriptors are plain inputs; done, ready and the
// cycle counters are outputs. All defaults are the document's main sizes.
module bi_analytics_top #(
  parameter int unsigned NWORDS   = 32768,
  parameter int unsigned WORD_W   = 16,
  parameter int unsigned CU_DEPTH = 32,
  parameter int unsigned BUS_W    = 256,
  parameter int unsigned BIC_OPS  = 2048,
  parameter int unsigned BIM_ROWS = 512,
  parameter int unsigned BIQP_OPS = 4096,
  parameter int unsigned SEG_W    = 2048,
  parameter int unsigned ADDR_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- bitmap index creator ----
  input  logic              bic_start,
  input  logic [ADDR_W-1:0] bic_ops_base,
  input  logic [15:0]       bic_ops_count,
  input  logic [ADDR_W-1:0] bic_data_base,
  input  logic [15:0]       bic_batches,
  input  logic [ADDR_W-1:0] bic_out_base,
  output logic              bic_ready,
  output logic              bic_done,
  output logic [31:0]       bic_cycles,
  output logic              bic_mem_rd_req,
  output logic [ADDR_W-1:0] bic_mem_rd_addr,
  input  logic              bic_mem_rd_ready,
  input  logic              bic_mem_rd_valid,
  input  logic [BUS_W-1:0]  bic_mem_rd_data,
  output logic              bic_mem_wr_req,
  output logic [ADDR_W-1:0] bic_mem_wr_addr,
  output logic [BUS_W-1:0]  bic_mem_wr_data,
  input  logic              bic_mem_wr_ready,
  // ---- query processor with encoder ----
  input  logic              biqp_start,
  input  logic [ADDR_W-1:0] biqp_ops_base,
  input  logic [15:0]       biqp_ops_count,
  input  logic [ADDR_W-1:0] biqp_bim_base,
  input  logic [15:0]       biqp_nb,
  input  logic [15:0]       biqp_batches,
  input  logic [ADDR_W-1:0] biqp_out_base,
  input  logic              biqp_enc_en,
  output logic              biqp_ready,
  output logic              biqp_done,
  output logic [31:0]       biqp_cycles,
  output logic [31:0]       biqp_matches,
  output logic              biqp_mem_rd_req,
  output logic [ADDR_W-1:0] biqp_mem_rd_addr,
  input  logic              biqp_mem_rd_ready,
  input  logic              biqp_mem_rd_valid,
  input  logic [BUS_W-1:0]  biqp_mem_rd_data,
  output logic              biqp_mem_wr_req,
  output logic [ADDR_W-1:0] biqp_mem_wr_addr,
  output logic [BUS_W-1:0]  biqp_mem_wr_data,
  input  logic              biqp_mem_wr_ready
);
  bic #(.NWORDS(NWORDS), .WORD_W(WORD_W), .SEG_W(8), .CU_DEPTH(CU_DEPTH),
        .BUS_W(BUS_W), .NOPS(BIC_OPS), .ADDR_W(ADDR_W)) u_bic (
    .clk, .rst_n,
    .start(bic_start), .ops_base(bic_ops_base), .ops_count(bic_ops_count),
    .data_base(bic_data_base), .batches(bic_batches), .out_base(bic_out_base),
    .ready(bic_ready), .done(bic_done), .cycles(bic_cycles),
    .mem_rd_req(bic_mem_rd_req), .mem_rd_addr(bic_mem_rd_addr), .mem_rd_ready(bic_mem_rd_ready),
    .mem_rd_valid(bic_mem_rd_valid), .mem_rd_data(bic_mem_rd_data),
    .mem_wr_req(bic_mem_wr_req), .mem_wr_addr(bic_mem_wr_addr), .mem_wr_data(bic_mem_wr_data),
    .mem_wr_ready(bic_mem_wr_ready)
  );

  biqp #(.NBITS(NWORDS), .ROWS(BIM_ROWS), .NOPS(BIQP_OPS), .BUS_W(BUS_W),
         .SEG_W(SEG_W), .ADDR_W(ADDR_W)) u_biqp (
    .clk, .rst_n,
    .start(biqp_start), .ops_base(biqp_ops_base), .ops_count(biqp_ops_count),
    .bim_base(biqp_bim_base), .nb(biqp_nb), .batches(biqp_batches), .out_base(biqp_out_base),
    .enc_en(biqp_enc_en),
    .ready(biqp_ready), .done(biqp_done), .cycles(biqp_cycles), .n_matches(biqp_matches),
    .mem_rd_req(biqp_mem_rd_req), .mem_rd_addr(biqp_mem_rd_addr), .mem_rd_ready(biqp_mem_rd_ready),
    .mem_rd_valid(biqp_mem_rd_valid), .mem_rd_data(biqp_mem_rd_data),
    .mem_wr_req(biqp_mem_wr_req), .mem_wr_addr(biqp_mem_wr_addr), .mem_wr_data(biqp_mem_wr_data),
    .mem_wr_ready(biqp_mem_wr_ready)
  );
endmodule
