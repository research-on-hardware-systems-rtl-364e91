// bic_qla: query logic array of the bitmap index creator.
//
// One logic set per record: an OR gate (OR: RR <= RR | BI vector), an
// inverter (NO: RR <= ~RR) and a multiplexer choosing what is stored in the
// NWORDS-bit result register RR; every operation takes one cycle. EQ copies
// RR into the output FIFO and clears RR, as the document specifies. The
// FIFO here holds one whole vector and is drained by the DMA in
// NWORDS/BUS_W beats (beat k = RR bits [256k+255:256k]) while the next
// operations run. An EQ that arrives while the FIFO still drains raises
// 'stall'; the caller then holds the operation and its BI vector.
// Interface: op_valid/op/bi_vec arrive together; out_* is valid/ready.
module bic_qla #(
  parameter int unsigned NWORDS = 32768,
  parameter int unsigned BUS_W  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              op_valid,
  input  logic [31:0]       op,
  input  logic [NWORDS-1:0] bi_vec,
  output logic              stall,
  output logic              out_valid,
  output logic [BUS_W-1:0]  out_data,
  output logic              out_last,
  input  logic              out_ready,
  output logic              fifo_busy
);
  import bi_pkg::*;
  localparam int unsigned VBEATS = NWORDS / BUS_W;
  localparam int unsigned BW     = (VBEATS > 1) ? $clog2(VBEATS) : 1;

  logic [NWORDS-1:0] rr, v_or, v_no, fifo;
  logic [BW-1:0]     beat;
  logic              is_or, is_no, is_eq, go;

  assign is_or = op[BIC_OR_BIT];
  assign is_no = op[BIC_NO_BIT];
  assign is_eq = op[BIC_EQ_BIT];
  assign stall = op_valid && is_eq && fifo_busy;
  assign go    = op_valid && !stall;

  assign v_or = is_or ? (rr | bi_vec) : rr;
  assign v_no = is_no ? ~v_or : v_or;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; fifo_busy <= 1'b0; beat <= '0;
    end else begin
      if (go) rr <= is_eq ? '0 : v_no;
      if (out_valid && out_ready) begin
        beat <= beat + 1'b1;
        if (out_last) fifo_busy <= 1'b0;
      end
      if (go && is_eq) begin
        fifo_busy <= 1'b1;
        beat      <= '0;
      end
    end
  end

  always_ff @(posedge clk)
    if (go && is_eq) fifo <= v_no;

  assign out_valid = fifo_busy;
  assign out_data  = fifo[beat*BUS_W +: BUS_W];
  assign out_last  = (beat == BW'(VBEATS - 1));
endmodule
