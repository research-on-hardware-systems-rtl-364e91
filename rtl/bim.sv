// bim: bitmap index memory of the query processor, ROWS x NBITS bits
// (512 x 32768 at the defaults).
//
// Built, as in the document, from UNITS = NBITS/BUS_W memory units (bimu),
// grouped in blocks of 16; unit u holds bits [256u+255:256u] of every row.
// Loading: the DMA writes one BUS_W-bit word per cycle at address
// addr = {row, select}: the address decoder enables unit 'select' and the
// word goes to 'row', so rows fill one after another in UNITS cycles each.
// Query side: rd_row reads a whole row from every unit at once (index,
// registered, valid one cycle after rd_en), and an LD writes a whole row
// from the result register through the units' second port (ld_en wins over
// a DMA write to the same place).
module bim #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned NBITS = 32768,
  parameter int unsigned BUS_W = 256,
  localparam int unsigned UNITS = NBITS / BUS_W,
  localparam int unsigned SW    = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             wen,
  input  logic [RW+SW-1:0] addr,
  input  logic [BUS_W-1:0] data_a,
  input  logic             ld_en,
  input  logic [RW-1:0]    ld_row,
  input  logic [NBITS-1:0] update,
  input  logic             rd_en,
  input  logic [RW-1:0]    rd_row,
  output logic [NBITS-1:0] index
);
  wire [RW-1:0] row_a = addr[RW+SW-1:SW];
  wire [SW-1:0] sel_a = addr[SW-1:0];

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    bimu #(.DEPTH(ROWS), .BUS_W(BUS_W)) u_bimu (
      .clk,
      .wa (wen && (UNITS == 1 || sel_a == SW'(u))),
      .aa (row_a),
      .da (data_a),
      .wb (ld_en),
      .ab (ld_row),
      .db (update[u*BUS_W +: BUS_W]),
      .rb (rd_en),
      .rab(rd_row),
      .qb (index[u*BUS_W +: BUS_W])
    );
  end
endmodule
