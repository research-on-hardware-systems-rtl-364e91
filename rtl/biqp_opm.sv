// biqp_opm: operation memory of the query processor.
//
// Holds NOPS 16-bit operations. The DMA writes one BUS_W-bit word, sixteen
// operations, per cycle into one row of all sixteen operation RAMs at once;
// operations are read out one per cycle through a 16-to-1 multiplexer, in
// order: row 0 of RAM 0..15, then row 1, and so on (operation i is word
// i % 16 of row i / 16). Registered read: rd_op is valid one cycle after
// rd_en and holds while rd_en is low.
module biqp_opm #(
  parameter int unsigned NOPS  = 4096,
  parameter int unsigned BUS_W = 256,
  localparam int unsigned PER  = BUS_W / 16,
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
  output logic [15:0]      rd_op
);
  localparam int unsigned LW = $clog2(PER);
  // One RAM per operation slot, as sixteen narrow RAMs share the write row.
  logic [15:0]   dpm [PER][ROWS];
  logic [15:0]   q [PER];
  logic [LW-1:0] sel_q;

  always_ff @(posedge clk) begin
    for (int k = 0; k < PER; k++) begin
      if (wr_en) dpm[k][wr_row] <= wr_data[k*16 +: 16];
      if (rd_en) q[k] <= dpm[k][rd_idx[IW-1:LW]];
    end
    if (rd_en) sel_q <= rd_idx[LW-1:0];
  end
  assign rd_op = q[sel_q];
endmodule
