// tb_mpe: self-checking test of the multi-match priority encoder. Loads
// random 64-bit and 2048-bit vectors and checks that every set bit comes
// out once, in ascending order, one per cycle while adv is high, that adv
// low holds the current match, and that 'last' marks the final match.
module tb_mpe;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, adv;
  logic [63:0] e;
  logic [5:0]  q;
  logic m, last;
  mpe #(.L(64)) dut (.clk, .rst_n, .en, .e, .adv, .q, .m, .last);

  logic en2, adv2;
  logic [2047:0] e2;
  logic [10:0] q2;
  logic m2, last2;
  mpe dut2 (.clk, .rst_n, .en(en2), .e(e2), .adv(adv2), .q(q2), .m(m2), .last(last2));

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    en = 0; adv = 0; e = '0; en2 = 0; adv2 = 0; e2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [63:0] v;
      int cyc, held;
      v = {32'($urandom), 32'($urandom)} & {32'($urandom), 32'($urandom)};
      if (t == 0) v = '0;
      if (t == 1) v = '1;
      @(negedge clk); en = 1; e = v;
      @(negedge clk); en = 0;
      cyc = 0; held = 0;
      for (int i = 0; i < 64; i++) if (v[i]) begin
        int rem;
        // one cycle with adv low: the match must hold
        if ((t % 5) == 2 && held == 0) begin
          adv = 0; @(negedge clk); held = 1;
        end
        checks++;
        if (!m || q != 6'(i)) fail($sformatf("mpe64 t=%0d exp %0d got m=%0d q=%0d", t, i, m, q));
        rem = 0;
        for (int j = i + 1; j < 64; j++) rem += v[j];
        checks++;
        if (last != (rem == 0)) fail("mpe64 last flag");
        adv = 1; @(negedge clk); cyc++;
      end
      adv = 0;
      checks++;
      if (m) fail("mpe64 not empty after all matches");
      checks++;
      if (cyc != $countones(v)) fail("mpe64 one match per cycle");
    end
    // default-size register: a sparse 2048-bit vector
    for (int t = 0; t < 4; t++) begin
      logic [2047:0] v;
      int last_i;
      v = '0;
      for (int k = 0; k < 20; k++) v[$urandom % 2048] = 1'b1;
      v[2047] = 1'b1;
      @(negedge clk); en2 = 1; e2 = v;
      @(negedge clk); en2 = 0; adv2 = 1;
      last_i = -1;
      for (int i = 0; i < 2048; i++) if (v[i]) begin
        checks++;
        if (!m2 || int'(q2) != i) fail($sformatf("mpe2k exp %0d got %0d", i, q2));
        @(negedge clk);
      end
      adv2 = 0;
      checks++;
      if (m2) fail("mpe2k not empty");
    end
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
