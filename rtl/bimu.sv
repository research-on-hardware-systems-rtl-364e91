// bimu: bitmap-index-memory unit, DEPTH x BUS_W bits.
//
// In the document a unit is sixteen 512 x 16-bit dual-port RAMs side by
// side; here the same 512 x 256 memory is one array with two ports.
// Port A (wa/aa/da) takes DMA loads; port B reads a row (rb -> qb, registered,
// valid one cycle later, held while rb is low) and writes a row from the
// result register (wb/ab/db, the LD operation). A port-B write wins over a
// port-A write to the same address in the same cycle (this design's choice).
module bimu #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned BUS_W = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wa,
  input  logic [AW-1:0]    aa,
  input  logic [BUS_W-1:0] da,
  input  logic             wb,
  input  logic [AW-1:0]    ab,
  input  logic [BUS_W-1:0] db,
  input  logic             rb,
  input  logic [AW-1:0]    rab,
  output logic [BUS_W-1:0] qb
);
  logic [BUS_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wb)                       mem[ab] <= db;
    if (wa && !(wb && ab == aa))  mem[aa] <= da;
    if (rb)                       qb <= mem[rab];
  end
endmodule
