// bie: bitmap index encoder.
//
// Turns an NBITS-wide bitmap into the list of its set-bit positions,
// ascending, one per clock. A multiplexer hands the bitmap to a SEG_W-bit
// multi-match priority encoder (mpe) one segment at a time. Per segment:
// one load cycle, then one cycle per set bit, then two wait cycles before the
// next segment (none after the last). With pos_ready held high an encode
// therefore takes segs*(1+K) + (segs-1)*2 cycles from start, segs =
// NBITS/SEG_W and K the number of ones in a segment; these timings are the
// document's. pos_ready low holds the current position (valid/ready).
// The bitmap must stay stable from start until done. done pulses for one
// cycle after the last position (or last wait) of the last segment.
module bie #(
  parameter int unsigned NBITS = 32768,
  parameter int unsigned SEG_W = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [NBITS-1:0]         bitmap,
  output logic                     busy,
  output logic                     pos_valid,
  output logic [$clog2(NBITS)-1:0] pos,
  input  logic                     pos_ready,
  output logic                     done
);
  localparam int unsigned SEGS = NBITS / SEG_W;
  localparam int unsigned SW   = (SEGS > 1) ? $clog2(SEGS) : 1;
  localparam int unsigned QW   = $clog2(SEG_W);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_WAIT} state_e;
  state_e        st;
  logic [SW-1:0] seg;
  logic          wcnt;
  logic [SEG_W-1:0] seg_data;
  logic          en, adv, m, last;
  logic [QW-1:0] q;

  assign seg_data = bitmap[seg*SEG_W +: SEG_W];
  assign en  = (st == S_LOAD);
  assign adv = (st == S_RUN) && pos_ready;

  mpe #(.L(SEG_W)) u_mpe (.clk, .rst_n, .en, .e(seg_data), .adv, .q, .m, .last);

  assign pos_valid = (st == S_RUN) && m;
  if (SEGS > 1) begin : g_pos
    assign pos = {seg, q};
  end else begin : g_pos1
    assign pos = q;
  end
  assign busy = (st != S_IDLE);

  wire last_seg = (seg == SW'(SEGS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; seg <= '0; wcnt <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin seg <= '0; st <= S_LOAD; end
        S_LOAD: begin
          if (seg_data != '0) st <= S_RUN;
          else if (last_seg) begin st <= S_IDLE; done <= 1'b1; end
          else begin st <= S_WAIT; wcnt <= 1'b0; end
        end
        S_RUN: if (pos_ready && last) begin
          if (last_seg) begin st <= S_IDLE; done <= 1'b1; end
          else begin st <= S_WAIT; wcnt <= 1'b0; end
        end
        S_WAIT: begin
          wcnt <= 1'b1;
          if (wcnt) begin st <= S_LOAD; seg <= seg + 1'b1; end
        end
      endcase
    end
  end
endmodule
