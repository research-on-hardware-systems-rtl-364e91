// bic_opm: operation memory of the bitmap index creator.
//
// Holds NOPS 32-bit operations {key[31:16], reserved, EQ, NO, OR}. It is
// written one bus beat (BUS_W/32 = 8 operations) per cycle, and read one
// operation per cycle: operation i is word i % 8 of row i / 8 (lowest word
// first, this design's choice). The read is registered: rd_op is valid one
// cycle after rd_en and holds while rd_en is low.
module bic_opm #(
  parameter int unsigned NOPS  = 2048,
  parameter int unsigned BUS_W = 256,
  localparam int unsigned PER  = BUS_W / 32,
  localparam int unsigned ROWS = NOPS / PER,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned IW   = $clog2(NOPS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [RW-1:0]    wr_row,
  input  logic [BUS_W-1:0] wr_data,
  input  logic             rd_en,
  input  logic [IW-1:0]    rd_idx,
  output logic [31:0]      rd_op
);
  localparam int unsigned LW = $clog2(PER);
  logic [BUS_W-1:0] mem [ROWS];
  logic [BUS_W-1:0] row_q;
  logic [LW-1:0]    lane_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en) begin
      row_q  <= mem[rd_idx[IW-1:LW]];
      lane_q <= rd_idx[LW-1:0];
    end
  end
  assign rd_op = row_q[lane_q*32 +: 32];
endmodule
