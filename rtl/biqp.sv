// biqp: bitmap-index-based query processor with its bitmap index encoder.
//
// A job: the DMA loads ops_count 16-bit operations into the operation
// memory (biqp_opm, 16 per beat); then for each of 'batches' batches it
// loads nb BI vectors of NBITS bits into the bitmap index memory (bim,
// NBITS/BUS_W beats per vector, address {row, select}) and runs every
// operation, one per cycle, in the query logic array (biqp_qla). Each EQ
// hands the result register to the output stage, which, while later
// operations and the next batch load go on, either
//   enc_en = 0: writes the NBITS-bit result raw, NBITS/BUS_W beats, or
//   enc_en = 1: runs it through the encoder (bie) and writes the matching
//     positions, sixteen 16-bit slots per beat, ended by at least one
//     0xFFFF terminator and padded with 0xFFFF to a whole beat.
// Results go to consecutive words from out_base. The operation pipeline is
// OPM read -> BIM row read -> QLA, one stage per cycle; an EQ that finds the
// output stage busy freezes it. Timing follows the document's model:
// t_OPM = N_q/16, t_BIM = N_b*NBITS/256, t_QLA = N_q, t_OUT = NBITS/256
// (raw) or the encoder time (encoded). The encoded-output layout and the
// run-time encoder switch are this design's choices.
// 'cycles' counts the clocks of the last job from start to done.
module biqp #(
  parameter int unsigned NBITS  = 32768,
  parameter int unsigned ROWS   = 512,
  parameter int unsigned NOPS   = 4096,
  parameter int unsigned BUS_W  = 256,
  parameter int unsigned SEG_W  = 2048,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] ops_base,
  input  logic [15:0]       ops_count,
  input  logic [ADDR_W-1:0] bim_base,
  input  logic [15:0]       nb,
  input  logic [15:0]       batches,
  input  logic [ADDR_W-1:0] out_base,
  input  logic              enc_en,
  output logic              ready,
  output logic              done,
  output logic [31:0]       cycles,
  output logic [31:0]       n_matches,
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
  localparam int unsigned UNITS = NBITS / BUS_W;
  localparam int unsigned SW    = (UNITS > 1) ? $clog2(UNITS) : 1;
  localparam int unsigned RW    = $clog2(ROWS);
  localparam int unsigned OPW   = $clog2(NOPS);
  localparam int unsigned OPER  = BUS_W / 16;
  localparam int unsigned OROWS = NOPS / OPER;
  localparam int unsigned ORW   = (OROWS > 1) ? $clog2(OROWS) : 1;
  localparam int unsigned PW    = $clog2(NBITS);
  localparam int unsigned SLOTS = BUS_W / 16;
  localparam int unsigned KW    = $clog2(SLOTS);
  localparam int unsigned LEN_W = 24;

  typedef enum logic [2:0] {S_IDLE, S_OPM, S_LOAD, S_RUN, S_DRAIN} state_e;
  typedef enum logic [2:0] {O_IDLE, O_RAW, O_ENC, O_FLUSH, O_WLAST} ostate_e;
  state_e  st;
  ostate_e ost;

  // ---------------- DMA ----------------
  logic [1:0]              rd_start, rd_busy, rd_valid;
  logic [1:0][ADDR_W-1:0]  rd_base;
  logic [1:0][LEN_W-1:0]   rd_len;
  logic [BUS_W-1:0]        rd_data;
  logic [LEN_W-1:0]        rd_idx;
  logic                    wr_valid, wr_ready;
  logic [BUS_W-1:0]        wr_data;

  bi_dma #(.ADDR_W(ADDR_W), .BUS_W(BUS_W), .LEN_W(LEN_W)) u_dma (
    .clk, .rst_n,
    .rd_start, .rd_base, .rd_len, .rd_busy, .rd_valid, .rd_data, .rd_idx,
    .wr_start(start && ready), .wr_base(out_base), .wr_valid, .wr_data, .wr_ready,
    .mem_rd_req, .mem_rd_addr, .mem_rd_ready, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_ready
  );

  // ---------------- control state ----------------
  logic [15:0]       batch, n_ops, n_b;
  logic [ADDR_W-1:0] bbase;
  logic              launched, enc_q;
  logic [OPW:0]      pc;
  logic              v1, v2, stall;
  logic [15:0]       op1, op2;

  assign ready = (st == S_IDLE);

  biqp_opm #(.NOPS(NOPS), .BUS_W(BUS_W)) u_opm (
    .clk,
    .wr_en (rd_valid[0]),
    .wr_row(rd_idx[ORW-1:0]),
    .wr_data(rd_data),
    .rd_en (!stall),
    .rd_idx(pc[OPW-1:0]),
    .rd_op (op1)
  );

  logic             ld_en;
  logic [8:0]       ld_row;
  logic [NBITS-1:0] rr, row_q, obuf;
  logic             obuf_busy, obuf_free;

  bim #(.ROWS(ROWS), .NBITS(NBITS), .BUS_W(BUS_W)) u_bim (
    .clk,
    .wen   (rd_valid[1]),
    .addr  (rd_idx[RW+SW-1:0]),
    .data_a(rd_data),
    .ld_en,
    .ld_row(ld_row[RW-1:0]),
    .update(rr),
    .rd_en (!stall),
    .rd_row(op1[7 +: RW]),
    .index (row_q)
  );

  biqp_qla #(.NBITS(NBITS)) u_qla (
    .clk, .rst_n,
    .op_valid(v2), .op(op2), .bim_row(row_q),
    .stall, .ld_en, .ld_row, .rr,
    .obuf_busy, .obuf, .obuf_free
  );

  wire issue = (st == S_RUN) && (pc < (OPW+1)'(n_ops)) && !stall;

  always_comb begin
    rd_start = '0;
    rd_base  = '0;
    rd_len   = '0;
    rd_base[0] = ops_base;
    rd_len[0]  = LEN_W'((32'(n_ops) + OPER - 1) / OPER);
    rd_base[1] = bbase;
    rd_len[1]  = LEN_W'(32'(n_b) * UNITS);
    if (!launched) begin
      rd_start[0] = (st == S_OPM);
      rd_start[1] = (st == S_LOAD);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; batch <= '0; n_ops <= '0; n_b <= '0; bbase <= '0; enc_q <= 1'b0;
      launched <= 1'b0; pc <= '0; v1 <= 1'b0; v2 <= 1'b0; op2 <= '0;
      done <= 1'b0; cycles <= '0;
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
          n_ops <= ops_count; n_b <= nb; bbase <= bim_base; batch <= '0; enc_q <= enc_en;
          cycles <= '0; launched <= 1'b0; st <= S_OPM;
        end
        S_OPM: begin
          launched <= 1'b1;
          if (launched && !rd_busy[0]) begin launched <= 1'b0; st <= S_LOAD; end
        end
        S_LOAD: begin
          launched <= 1'b1;
          if (launched && !rd_busy[1]) begin launched <= 1'b0; pc <= '0; st <= S_RUN; end
        end
        S_RUN: if (!issue && pc == (OPW+1)'(n_ops) && !v1 && !v2) begin
          batch <= batch + 1'b1;
          bbase <= bbase + ADDR_W'(32'(n_b) * UNITS);
          st    <= (batch + 1'b1 == batches) ? S_DRAIN : S_LOAD;
        end
        S_DRAIN: if (!obuf_busy) begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- output stage: raw beats or encoded positions ----------------
  logic             bie_start, bie_busy, pos_valid, pos_ready, bie_done;
  logic [PW-1:0]    pos;
  logic [SW-1:0]    obeat;
  logic [BUS_W-1:0] pk;
  logic [KW-1:0]    slot;
  logic             pk_full;

  bie #(.NBITS(NBITS), .SEG_W(SEG_W)) u_bie (
    .clk, .rst_n, .start(bie_start), .bitmap(obuf), .busy(bie_busy),
    .pos_valid, .pos, .pos_ready, .done(bie_done)
  );

  assign bie_start = (ost == O_IDLE) && obuf_busy && enc_q;
  assign pos_ready = (ost == O_ENC) && !pk_full;

  always_comb begin
    wr_valid = 1'b0;
    wr_data  = pk;
    if (ost == O_RAW) begin
      wr_valid = 1'b1;
      wr_data  = obuf[obeat*BUS_W +: BUS_W];
    end else if (pk_full) begin
      wr_valid = 1'b1;
    end
  end

  assign obuf_free = (ost == O_RAW && wr_ready && obeat == SW'(UNITS - 1)) ||
                     (ost == O_WLAST && wr_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ost <= O_IDLE; obeat <= '0; pk <= '0; slot <= '0; pk_full <= 1'b0; n_matches <= '0;
    end else begin
      if (st == S_IDLE && start) n_matches <= '0;
      if (pk_full && wr_ready && ost != O_WLAST) begin pk_full <= 1'b0; slot <= '0; end
      unique case (ost)
        O_IDLE: if (obuf_busy) begin
          obeat <= '0; slot <= '0; pk_full <= 1'b0;
          ost <= enc_q ? O_ENC : O_RAW;
        end
        O_RAW: if (wr_ready) begin
          obeat <= obeat + 1'b1;
          if (obeat == SW'(UNITS - 1)) ost <= O_IDLE;
        end
        O_ENC: begin
          if (pos_valid && pos_ready) begin
            pk[slot*16 +: 16] <= 16'(pos);
            slot    <= slot + 1'b1;
            n_matches <= n_matches + 1'b1;
            if (slot == KW'(SLOTS - 1)) pk_full <= 1'b1;
          end
          if (bie_done) ost <= O_FLUSH;
        end
        O_FLUSH: if (!pk_full) begin
          // terminator and padding: every slot from 'slot' on becomes 0xFFFF
          for (int k = 0; k < SLOTS; k++)
            if (KW'(k) >= slot) pk[k*16 +: 16] <= ENC_TERM;
          pk_full <= 1'b1;
          ost     <= O_WLAST;
        end
        O_WLAST: if (wr_ready) begin
          pk_full <= 1'b0; slot <= '0; ost <= O_IDLE;
        end
        default: ost <= O_IDLE;
      endcase
    end
  end
endmodule
