// tb_bie: self-checking test of the bitmap index encoder at its default
// size (32768-bit bitmap, 2048-bit segments). Checks every emitted position
// against the bitmap, and the encode time against
// t = segs*(1+K) + (segs-1)*2 cycles for an empty bitmap (46 cycles), a
// sparse one, and a full one (32814 cycles), then repeats a random bitmap
// with random pos_ready stalls for correctness only.
module tb_bie;
  localparam int NB = 32768, SW = 2048, SEGS = NB / SW;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, pos_valid, pos_ready, done;
  logic [NB-1:0] bitmap;
  logic [14:0] pos;
  bie dut (.clk, .rst_n, .start, .bitmap, .busy, .pos_valid, .pos, .pos_ready, .done);

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  task automatic run(input logic [NB-1:0] v, input bit stalls, input bit check_time);
    int exp_next, cyc, expect_cyc, k;
    bitmap = v;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    exp_next = 0; cyc = 1;
    while (!done) begin
      pos_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (pos_valid && pos_ready) begin
        while (exp_next < NB && !v[exp_next]) exp_next++;
        checks++;
        if (int'(pos) != exp_next) fail($sformatf("pos exp %0d got %0d", exp_next, pos));
        exp_next++;
      end
      @(negedge clk); cyc++;
    end
    while (exp_next < NB && !v[exp_next]) exp_next++;
    checks++;
    if (exp_next != NB) fail("positions missing");
    if (check_time) begin
      expect_cyc = 0;
      for (int s = 0; s < SEGS; s++) begin
        k = 0;
        for (int i = 0; i < SW; i++) k += v[s*SW + i];
        expect_cyc += 1 + k;
      end
      expect_cyc += (SEGS - 1) * 2;
      checks++;
      // cyc counts from the start cycle to the cycle done is seen
      if (cyc - 1 != expect_cyc) fail($sformatf("encode time %0d expected %0d", cyc - 1, expect_cyc));
      else $display("encode time %0d cycles as expected", expect_cyc);
    end
    pos_ready = 1;
  endtask

  initial begin
    logic [NB-1:0] v;
    start = 0; pos_ready = 1; bitmap = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('0, 0, 1);                       // best case: 46 cycles
    v = '0;
    for (int i = 0; i < 300; i++) v[$urandom % NB] = 1'b1;
    v[0] = 1'b1; v[NB-1] = 1'b1;
    run(v, 0, 1);
    run('1, 0, 1);                       // worst case: 32814 cycles
    v = '0;
    for (int i = 0; i < 500; i++) v[$urandom % NB] = 1'b1;
    run(v, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
