// bic: bitmap index creator (BIC32K16 at the defaults).
//
// Indexes a table column of NWORDS-word batches against a list of
// operations/keys. A job is: the DMA loads ops_count operations into the
// operation memory (bic_opm, 8 per beat); then for each of 'batches'
// batches the CAM (ram_cam) is first cleared of the previous batch by
// replaying it with set = 0 (before the first batch of a job every CAM row
// is zeroed by a 256-cycle sweep that runs while the operations load), loaded with the batch
// (NWORDS/16 beats), and every operation is run, one per cycle: the key
// reads a BI vector from the CAM and the query logic array (bic_qla)
// combines it into the result register (OR, NO) or sends the result out
// (EQ). Results are written from out_base on, NWORDS/BUS_W beats each, while
// the next operations run. Each cycle count follows the document's timing
// model: t_OPM = N_k/8, t_CAM = 2*NWORDS/16, t_QLA = N_k, t_OUT =
// NWORDS/256 per vector (overlapped here with later work).
// Operation pipeline: OPM read -> CAM read -> QLA, one stage per cycle; an
// EQ that finds the output FIFO busy freezes all three stages.
// 'cycles' counts the clocks of the last job from start to done.
module bic #(
  parameter int unsigned NWORDS   = 32768,
  parameter int unsigned WORD_W   = 16,
  parameter int unsigned SEG_W    = 8,
  parameter int unsigned CU_DEPTH = 32,
  parameter int unsigned BUS_W    = 256,
  parameter int unsigned NOPS     = 2048,
  parameter int unsigned ADDR_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // job
  input  logic              start,
  input  logic [ADDR_W-1:0] ops_base,
  input  logic [15:0]       ops_count,
  input  logic [ADDR_W-1:0] data_base,
  input  logic [15:0]       batches,
  input  logic [ADDR_W-1:0] out_base,
  output logic              ready,
  output logic              done,
  output logic [31:0]       cycles,
  // memory controller
  output logic              mem_rd_req,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_ready,
  input  logic              mem_rd_valid,
  input  logic [BUS_W-1:0]  mem_rd_data,
  output logic              mem_wr_req,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [BUS_W-1:0]  mem_wr_data,
  input  logic              mem_wr_ready
);
  import bi_pkg::*;
  localparam int unsigned LANES  = BUS_W / WORD_W;
  localparam int unsigned BEATS  = NWORDS / LANES;           // beats per batch
  localparam int unsigned CBW    = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned OPW    = $clog2(NOPS);
  localparam int unsigned OPER   = BUS_W / 32;               // ops per beat
  localparam int unsigned OROWS  = NOPS / OPER;
  localparam int unsigned ORW    = (OROWS > 1) ? $clog2(OROWS) : 1;
  localparam int unsigned LEN_W  = 24;

  typedef enum logic [2:0] {S_IDLE, S_OPM, S_CLR, S_LOAD, S_RUN, S_DRAIN} state_e;
  state_e st;

  // ---------------- DMA ----------------
  logic [1:0]              rd_start, rd_busy, rd_valid;
  logic [1:0][ADDR_W-1:0]  rd_base;
  logic [1:0][LEN_W-1:0]   rd_len;
  logic [BUS_W-1:0]        rd_data;
  logic [LEN_W-1:0]        rd_idx;
  logic                    wr_valid, wr_ready, out_last, fifo_busy;
  logic [BUS_W-1:0]        wr_data;

  bi_dma #(.ADDR_W(ADDR_W), .BUS_W(BUS_W), .LEN_W(LEN_W)) u_dma (
    .clk, .rst_n,
    .rd_start, .rd_base, .rd_len, .rd_busy, .rd_valid, .rd_data, .rd_idx,
    .wr_start(start && ready), .wr_base(out_base), .wr_valid, .wr_data, .wr_ready,
    .mem_rd_req, .mem_rd_addr, .mem_rd_ready, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_ready
  );

  // ---------------- control state ----------------
  logic [15:0]       batch, n_ops;
  logic [ADDR_W-1:0] dbase;
  logic [SEG_W-1:0]  init_row;
  logic              sweeping;
  logic              launched;    // DMA transfer of the current state started
  logic [OPW:0]      pc;
  logic              v1, v2, stall;
  logic [31:0]       op2;
  logic [31:0]       op1;
  logic              cam_set;

  assign ready = (st == S_IDLE);

  // ---------------- OPM ----------------
  bic_opm #(.NOPS(NOPS), .BUS_W(BUS_W)) u_opm (
    .clk,
    .wr_en (rd_valid[0]),
    .wr_row(rd_idx[ORW-1:0]),
    .wr_data(rd_data),
    .rd_en (!stall),
    .rd_idx(pc[OPW-1:0]),
    .rd_op (op1)
  );

  // ---------------- CAM ----------------
  logic [NWORDS-1:0] bi_vec;
  ram_cam #(.NWORDS(NWORDS), .WORD_W(WORD_W), .SEG_W(SEG_W), .CU_DEPTH(CU_DEPTH), .BUS_W(BUS_W)) u_cam (
    .clk,
    .wr_en  (rd_valid[1]),
    .wr_beat(rd_idx[CBW-1:0]),
    .wr_data(rd_data),
    .wr_set (cam_set),
    .clr_en (sweeping),
    .clr_row(init_row),
    .rd_en  (!stall),
    .rd_key (op1[16 +: WORD_W]),
    .rd_vec (bi_vec)
  );

  // ---------------- QLA ----------------
  bic_qla #(.NWORDS(NWORDS), .BUS_W(BUS_W)) u_qla (
    .clk, .rst_n,
    .op_valid(v2), .op(op2), .bi_vec,
    .stall, .out_valid(wr_valid), .out_data(wr_data), .out_last, .out_ready(wr_ready),
    .fifo_busy
  );

  wire issue = (st == S_RUN) && (pc < (OPW+1)'(n_ops)) && !stall;

  // ---------------- controller ----------------
  always_comb begin
    rd_start = '0;
    rd_base  = '0;
    rd_len   = '0;
    rd_base[0] = ops_base;
    rd_len[0]  = LEN_W'((32'(n_ops) + OPER - 1) / OPER);
    rd_base[1] = (st == S_CLR) ? dbase - ADDR_W'(BEATS) : dbase;
    rd_len[1]  = LEN_W'(BEATS);
    if (!launched) begin
      rd_start[0] = (st == S_OPM);
      rd_start[1] = (st == S_CLR) || (st == S_LOAD);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; init_row <= '0; sweeping <= 1'b0; batch <= '0; n_ops <= '0; dbase <= '0;
      launched <= 1'b0; pc <= '0; v1 <= 1'b0; v2 <= 1'b0; op2 <= '0;
      cam_set <= 1'b1; done <= 1'b0; cycles <= '0;
    end else begin
      done <= 1'b0;
      if (st != S_IDLE) cycles <= cycles + 1'b1;
      if (!stall) begin
        v1  <= issue;
        v2  <= v1;
        op2 <= op1;
        if (issue) pc <= pc + 1'b1;
      end
      unique case (st)
        S_IDLE: if (start) begin
          n_ops <= ops_count; dbase <= data_base; batch <= '0;
          cycles <= '0; launched <= 1'b0; st <= S_OPM;
          sweeping <= 1'b1; init_row <= '0;
        end
        S_OPM: begin
          launched <= 1'b1;
          if (sweeping) begin
            init_row <= init_row + 1'b1;
            if (init_row == '1) sweeping <= 1'b0;
          end
          if (launched && !rd_busy[0] && !sweeping) begin
            launched <= 1'b0; cam_set <= 1'b1; st <= S_LOAD;
          end
        end
        S_CLR: begin
          launched <= 1'b1;
          if (launched && !rd_busy[1]) begin
            launched <= 1'b0; cam_set <= 1'b1; st <= S_LOAD;
          end
        end
        S_LOAD: begin
          launched <= 1'b1;
          if (launched && !rd_busy[1]) begin
            launched <= 1'b0; pc <= '0; st <= S_RUN;
          end
        end
        S_RUN: if (!issue && pc == (OPW+1)'(n_ops) && !v1 && !v2) begin
          batch <= batch + 1'b1;
          dbase <= dbase + ADDR_W'(BEATS);
          if (batch + 1'b1 == batches) st <= S_DRAIN;
          else begin cam_set <= 1'b0; st <= S_CLR; end
        end
        S_DRAIN: if (!fifo_busy) begin
          done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
