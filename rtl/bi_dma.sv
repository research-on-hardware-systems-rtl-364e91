// bi_dma: three-channel DMA between an accelerator and the memory
// controller, one BUS_W-bit word per cycle at full rate.
//
// Channels 0 and 1 read: rd_start[c] with rd_base[c] and rd_len[c] (in bus
// words) streams words base..base+len-1 back on rd_valid[c]/rd_data with the
// word index rd_idx. They share the memory read port; one runs at a time and
// a start on the other waits (channel 0 first when both wait). Channel 2
// writes: wr_start loads the write address, then each accepted wr_valid word
// goes to the next address.
// Memory port (the controller's protocol is not specified, so this is a
// plain one): read requests mem_rd_req/mem_rd_addr accepted with
// mem_rd_ready, read data returned in order on mem_rd_valid (any latency,
// no backpressure); writes mem_wr_req/addr/data accepted with mem_wr_ready.
// Addresses count bus words.
module bi_dma #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned BUS_W  = 256,
  parameter int unsigned LEN_W  = 24
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // read channels
  input  logic [1:0]                  rd_start,
  input  logic [1:0][ADDR_W-1:0]      rd_base,
  input  logic [1:0][LEN_W-1:0]       rd_len,
  output logic [1:0]                  rd_busy,
  output logic [1:0]                  rd_valid,
  output logic [BUS_W-1:0]            rd_data,
  output logic [LEN_W-1:0]            rd_idx,
  // write channel
  input  logic                        wr_start,
  input  logic [ADDR_W-1:0]           wr_base,
  input  logic                        wr_valid,
  input  logic [BUS_W-1:0]            wr_data,
  output logic                        wr_ready,
  // memory controller
  output logic                        mem_rd_req,
  output logic [ADDR_W-1:0]           mem_rd_addr,
  input  logic                        mem_rd_ready,
  input  logic                        mem_rd_valid,
  input  logic [BUS_W-1:0]            mem_rd_data,
  output logic                        mem_wr_req,
  output logic [ADDR_W-1:0]           mem_wr_addr,
  output logic [BUS_W-1:0]            mem_wr_data,
  input  logic                        mem_wr_ready
);
  logic [1:0]              pend;
  logic [1:0][ADDR_W-1:0]  p_base;
  logic [1:0][LEN_W-1:0]   p_len;
  logic                    active, ch;
  logic [ADDR_W-1:0]       base;
  logic [LEN_W-1:0]        len, issued, returned;
  logic [ADDR_W-1:0]       waddr;

  assign mem_rd_req  = active && (issued != len);
  assign mem_rd_addr = base + ADDR_W'(issued);

  assign rd_data  = mem_rd_data;
  assign rd_idx   = returned;
  assign rd_valid = {2{active && mem_rd_valid}} & {ch, !ch};
  assign rd_busy  = pend | {2{active}} & {ch, !ch};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0; active <= 1'b0; ch <= 1'b0;
      base <= '0; len <= '0; issued <= '0; returned <= '0;
      p_base <= '0; p_len <= '0;
    end else begin
      for (int c = 0; c < 2; c++)
        if (rd_start[c]) begin
          pend[c]   <= 1'b1;
          p_base[c] <= rd_base[c];
          p_len[c]  <= rd_len[c];
        end
      if (mem_rd_req && mem_rd_ready) issued <= issued + 1'b1;
      if (active && mem_rd_valid) begin
        returned <= returned + 1'b1;
        if (returned + 1'b1 == len) active <= 1'b0;
      end
      if (!active && (pend[0] || pend[1])) begin
        ch       <= !pend[0];
        base     <= pend[0] ? p_base[0] : p_base[1];
        len      <= pend[0] ? p_len[0]  : p_len[1];
        issued   <= '0;
        returned <= '0;
        active   <= (pend[0] ? p_len[0] : p_len[1]) != '0;
        if (pend[0]) pend[0] <= 1'b0; else pend[1] <= 1'b0;
      end
    end
  end

  // Write channel: plain address counter in front of the memory port.
  assign mem_wr_req  = wr_valid;
  assign mem_wr_addr = waddr;
  assign mem_wr_data = wr_data;
  assign wr_ready    = mem_wr_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    waddr <= '0;
    else if (wr_start)             waddr <= wr_base;
    else if (wr_valid && wr_ready) waddr <= waddr + 1'b1;

  // Read data only arrives for requests that were issued.
  a_rd_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_valid |-> (active && returned < issued))
    else $error("bi_dma: read data without an outstanding request");
endmodule
