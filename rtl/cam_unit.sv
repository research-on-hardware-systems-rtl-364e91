// cam_unit: one RAM-based CAM unit (CU), a CU_DEPTH x SEG_W-bit binary CAM.
//
// The storage is a 2^SEG_W x CU_DEPTH bit RAM seen two ways, as in the
// document's dual-port construction:
//   port A (1 bit wide): writing 'set' to bit {wa_data, wa_addr} records
//     (set=1) or erases (set=0) the fact "entry wa_addr holds wa_data";
//   port B (CU_DEPTH bits wide): reading row rb_key returns the match word,
//     bit a set when entry a holds rb_key. Row b_row can also be zeroed
//     through port B (used for the power-up clear).
// The match word is registered: it appears one cycle after rb_en and holds
// while rb_en is low. A port-B clear wins over a port-A write to the same
// row in the same cycle (this design's choice).
module cam_unit #(
  parameter int unsigned CU_DEPTH = 32,
  parameter int unsigned SEG_W    = 8
) (
  input  logic                        clk,
  input  logic                        wa_en,
  input  logic [SEG_W-1:0]            wa_data,
  input  logic [$clog2(CU_DEPTH)-1:0] wa_addr,
  input  logic                        wa_set,
  input  logic                        b_clr,
  input  logic [SEG_W-1:0]            b_row,
  input  logic                        rb_en,
  input  logic [SEG_W-1:0]            rb_key,
  output logic [CU_DEPTH-1:0]         rb_q
);
  logic [CU_DEPTH-1:0] ram [2**SEG_W];

  always_ff @(posedge clk) begin
    if (b_clr)      ram[b_row] <= '0;
    else if (wa_en) ram[wa_data][wa_addr] <= wa_set;
    if (rb_en)      rb_q <= ram[rb_key];
  end
endmodule
