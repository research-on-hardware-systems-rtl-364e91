// tb_bic_qla: self-checking test of the BIC query logic array (1024-bit
// vectors). Random OR / NO / EQ sequences are applied with random BI
// vectors; every result vector drained from the FIFO (4 beats, with random
// out_ready) is compared with a reference result register. Checks that RR
// is cleared by EQ, that an EQ issued while the FIFO drains raises stall
// (counted, must happen), and that an OR/NO operation takes one cycle.
module tb_bic_qla;
  localparam int NW = 1024, BUS = 256, VB = NW / BUS;
  int checks = 0, failures = 0, n_stall = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_valid = 0, stall, out_valid, out_last, out_ready, fifo_busy;
  logic [31:0] op;
  logic [NW-1:0] bi_vec;
  logic [BUS-1:0] out_data;

  bic_qla #(.NWORDS(NW), .BUS_W(BUS)) dut (.clk, .rst_n, .op_valid, .op, .bi_vec, .stall,
    .out_valid, .out_data, .out_last, .out_ready, .fifo_busy);

  logic [NW-1:0] rr_ref;
  logic [NW-1:0] expq [$];
  logic [NW-1:0] got;
  int beat = 0, n_vec = 0;

  // drain side
  always @(negedge clk) out_ready <= ($urandom % 4 != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got[beat*BUS +: BUS] = out_data;
    checks++;
    if (out_last != (beat == VB - 1)) failures++;
    beat++;
    if (beat == VB) begin
      beat = 0; checks++; n_vec++;
      if (expq.size() == 0 || got != expq[0]) begin
        failures++; $display("FAIL result vector %0d", n_vec);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  function automatic logic [NW-1:0] rv();
    logic [NW-1:0] v;
    for (int i = 0; i < NW / 32; i++) v[i*32 +: 32] = $urandom & $urandom;
    return v;
  endfunction

  initial begin
    out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rr_ref = '0;
    for (int t = 0; t < 300; t++) begin
      int kind;
      kind = $urandom % 6;
      @(negedge clk);
      op_valid = 1;
      bi_vec = rv();
      if (kind <= 2)      op = bi_pkg::bic_op(16'($urandom), 1, 0, 0);  // OR
      else if (kind == 3) op = bi_pkg::bic_op(16'($urandom), 0, 1, 0);  // NO
      else                op = bi_pkg::bic_op(16'($urandom), 0, 0, 1);  // EQ
      #1;
      while (stall) begin
        n_stall++;
        @(negedge clk); #1;
      end
      if (kind <= 2) rr_ref = rr_ref | bi_vec;
      else if (kind == 3) rr_ref = ~rr_ref;
      else begin expq.push_back(rr_ref); rr_ref = '0; end
      @(posedge clk); #1;
      if (kind != 4 && kind != 5) begin
        checks++;
        if (dut.rr != rr_ref) begin failures++; $display("FAIL rr after op %0d", t); end
      end
    end
    @(negedge clk); op_valid = 0;
    wait (!fifo_busy && expq.size() == 0);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("results %0d, stall cycles %0d", n_vec, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
