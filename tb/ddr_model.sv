// ddr_model: behavioural model of the external DDR3 memory behind its
// controller, for testbenches only (not synthesizable).
//
// Word-addressed (one BUS_W-bit word per address), sparse storage. Read
// requests are accepted when rd_ready is high and answered in order LAT
// cycles later on rd_valid/rd_data. Writes are accepted when wr_ready is
// high. Requests are ignored while rst_n is low. With stall_en high, rd_ready and wr_ready drop at random (about one
// cycle in four) to model controller refresh and row misses.
module ddr_model #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned BUS_W  = 256,
  parameter int unsigned LAT    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall_en,
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_ready,
  output logic              rd_valid,
  output logic [BUS_W-1:0]  rd_data,
  input  logic              wr_req,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [BUS_W-1:0]  wr_data,
  output logic              wr_ready
);
  logic [BUS_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [LAT-1:0]   pv = '0;
  logic [BUS_W-1:0] pd [LAT];
  int unsigned      n_rd_stall = 0, n_wr_stall = 0;

  initial begin
    rd_ready = 1'b1;
    wr_ready = 1'b1;
    for (int i = 0; i < LAT; i++) pd[i] = '0;
  end

  function automatic logic [BUS_W-1:0] peek(input logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    mem[a] = d;
  endfunction

  always @(posedge clk) if (!rst_n) begin
    pv <= '0;
  end else begin
    if (rd_req && !rd_ready) n_rd_stall++;
    if (wr_req && !wr_ready) n_wr_stall++;
    pv <= {pv[LAT-2:0], rd_req && rd_ready};
    pd[0] <= (rd_req && rd_ready) ? peek(rd_addr) : '0;
    for (int i = 1; i < LAT; i++) pd[i] <= pd[i-1];
    if (wr_req && wr_ready) mem[wr_addr] = wr_data;
    rd_ready <= !stall_en || ($urandom % 4 != 0);
    wr_ready <= !stall_en || ($urandom % 4 != 0);
  end

  assign rd_valid = pv[LAT-1];
  assign rd_data  = pd[LAT-1];
endmodule
