// ram_cam: RAM-based content-addressable memory of NWORDS x WORD_W bits in
// the enhanced cascade arrangement (CAM32K16 at the defaults).
//
// Structure (from the document): CAM units (cam_unit, CU_DEPTH entries of
// SEG_W bits) are grouped into CAM blocks (CBs) of LANES = BUS_W/WORD_W
// lanes; there are NCB = NWORDS/(LANES*CU_DEPTH) blocks. A WORD_W-bit lane
// is NSEG = WORD_W/SEG_W CAM units side by side, one per byte of the word,
// whose match words are ANDed (a match needs every byte to match).
// Loading: one bus beat carries LANES words; beat b goes to block
// b / CU_DEPTH, entry b % CU_DEPTH, lane l taking word l. So the whole CAM
// fills in NWORDS/LANES beats. wr_set = 1 indexes the words, wr_set = 0
// erases them (used to clear the previous batch before a new one).
// Reading: rd_key selects a row in every CU; bit n of rd_vec (record n =
// beat*LANES + lane) is the AND of the byte matches, so record order is kept.
// rd_vec is registered: it is valid one cycle after rd_en and holds while
// rd_en is low. clr_en zeroes row clr_row in every CU (power-up clear sweep).
module ram_cam #(
  parameter int unsigned NWORDS   = 32768,
  parameter int unsigned WORD_W   = 16,
  parameter int unsigned SEG_W    = 8,
  parameter int unsigned CU_DEPTH = 32,
  parameter int unsigned BUS_W    = 256,
  localparam int unsigned LANES   = BUS_W / WORD_W,
  localparam int unsigned BEATS   = NWORDS / LANES,
  localparam int unsigned BW      = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [BW-1:0]      wr_beat,
  input  logic [BUS_W-1:0]   wr_data,
  input  logic               wr_set,
  input  logic               clr_en,
  input  logic [SEG_W-1:0]   clr_row,
  input  logic               rd_en,
  input  logic [WORD_W-1:0]  rd_key,
  output logic [NWORDS-1:0]  rd_vec
);
  localparam int unsigned NSEG = WORD_W / SEG_W;
  localparam int unsigned NCB  = NWORDS / (LANES * CU_DEPTH);
  localparam int unsigned AW   = $clog2(CU_DEPTH);

  wire [AW-1:0] wr_addr = wr_beat[AW-1:0];

  for (genvar cb = 0; cb < NCB; cb++) begin : g_cb
    logic cb_we;
    if (NCB > 1) begin : g_sel
      assign cb_we = wr_en && (wr_beat[BW-1:AW] == (BW-AW)'(cb));
    end else begin : g_one
      assign cb_we = wr_en;
    end
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      logic [NSEG-1:0][CU_DEPTH-1:0] seg_q;
      logic [CU_DEPTH-1:0]           match;
      for (genvar s = 0; s < NSEG; s++) begin : g_seg
        cam_unit #(.CU_DEPTH(CU_DEPTH), .SEG_W(SEG_W)) u_cu (
          .clk,
          .wa_en  (cb_we),
          .wa_data(wr_data[l*WORD_W + s*SEG_W +: SEG_W]),
          .wa_addr(wr_addr),
          .wa_set (wr_set),
          .b_clr  (clr_en),
          .b_row  (clr_row),
          .rb_en  (rd_en),
          .rb_key (rd_key[s*SEG_W +: SEG_W]),
          .rb_q   (seg_q[s])
        );
      end
      always_comb begin
        match = '1;
        for (int s = 0; s < NSEG; s++) match &= seg_q[s];
      end
      // Entry a of lane l in block cb is record (cb*CU_DEPTH + a)*LANES + l.
      for (genvar a = 0; a < CU_DEPTH; a++) begin : g_bit
        assign rd_vec[(cb*CU_DEPTH + a)*LANES + l] = match[a];
      end
    end
  end
endmodule
