// tb_top_full: end-to-end test of bi_analytics_top with every parameter at
// its default (32768-record BI vectors, 32768 x 16-bit CAM, 512-row BIM,
// 2048-bit encoder segments). Runs the shared flow of tb_top_body.svh once:
// four attributes indexed in four CAM batches, the four BI vectors moved to
// the query memory, one six-operation query stored raw and encoded. No
// memory stalls, so the printed cycle counts can be set against the
// document's timing model.
module tb_top_full;
  localparam int NW = 32768, BIC_OPS_N = 2048, ROWS_N = 512, BIQP_OPS_N = 4096, SEG_N = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall_en = 0;
`include "tb_top_ports.svh"

  bi_analytics_top dut (.*);
`include "tb_top_mems.svh"

`include "tb_top_body.svh"
    // index time of 4 batches: sweep + 7 batch transfers + operations,
    // plus the drain of the last vector (VB beats) and memory latency
    checks++;
    if (bic_cyc < 256 + BEATS * 7 + 20 || bic_cyc > 256 + BEATS * 7 + 20 + 400)
      fail($sformatf("BIC cycle count %0d", bic_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
