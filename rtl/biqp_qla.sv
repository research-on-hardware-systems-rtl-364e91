// biqp_qla: query logic array of the query processor.
//
// One logic set per bit (two inverters, AND, OR, XOR and three
// multiplexers) feeding an NBITS-bit result
// register RR. Operations (bi_pkg::biqp_code_e), one per cycle:
//   AN / OR / XO  RR <= RR op row, with NI (code[2]) inverting the BIM row;
//   CR RR <= 0;  NO RR <= ~RR;  LD BIM[row] <= RR (ld_en/ld_row/rr);
//   EQ hand RR to the output stage: it is copied into obuf and obuf_busy
//   rises; the output stage lowers it with obuf_free when it is done.
// An EQ that finds obuf busy raises 'stall' and the caller holds the
// pipeline. An operation that reads the row written by the LD just before
// it gets RR by forwarding, because the memory read was issued in the same
// cycle as the write (this design's hazard handling).
// Interface: op_valid/op/bim_row arrive together, one cycle after the row
// was requested from the BIM.
module biqp_qla #(
  parameter int unsigned NBITS = 32768
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_valid,
  input  logic [15:0]      op,
  input  logic [NBITS-1:0] bim_row,
  output logic             stall,
  output logic             ld_en,
  output logic [8:0]       ld_row,
  output logic [NBITS-1:0] rr,
  output logic             obuf_busy,
  output logic [NBITS-1:0] obuf,
  input  logic             obuf_free
);
  import bi_pkg::*;
  biqp_op_t   o;
  logic [3:0] code;
  logic       go, is_ctl, fwd_ld;
  logic [8:0] fwd_row;
  logic [NBITS-1:0] a1, a2, nxt;

  assign o     = biqp_op_t'(op);
  assign code  = o.code;
  assign is_ctl = code[3];
  assign stall = op_valid && (code == Q_EQ) && obuf_busy;
  assign go    = op_valid && !stall;

  // a1: BIM row (forwarded after an LD to the same row), a2: after NI.
  assign a1 = (fwd_ld && fwd_row == o.row) ? rr : bim_row;
  assign a2 = code[2] ? ~a1 : a1;

  always_comb begin
    nxt = rr;
    if (!is_ctl) begin
      unique case (code[1:0])
        2'b00:   nxt = rr & a2;
        2'b01:   nxt = rr | a2;
        2'b10:   nxt = rr ^ a2;
        default: nxt = rr;
      endcase
    end else begin
      if (code == Q_CR) nxt = '0;
      if (code == Q_NO) nxt = ~rr;
    end
  end

  assign ld_en  = go && (code == Q_LD);
  assign ld_row = o.row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; obuf_busy <= 1'b0; fwd_ld <= 1'b0; fwd_row <= '0;
    end else begin
      if (go) begin
        rr      <= nxt;
        fwd_ld  <= (code == Q_LD);
        fwd_row <= o.row;
      end
      if (obuf_free) obuf_busy <= 1'b0;
      if (go && code == Q_EQ) obuf_busy <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (go && code == Q_EQ) obuf <= rr;
endmodule
