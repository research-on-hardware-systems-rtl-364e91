// tb_pe_2d: self-checking test of the 1D-to-2D priority encoder (pe_2d)
// and its leaves (pe_leaf). PE4 and PE8 are checked exhaustively, PE16 and
// the trees of 32, 64 and 2048 bits (the encoder's default size) on random
// and sparse inputs, against a reference "index of the highest set bit".
module tb_pe_2d;
  int checks = 0, failures = 0;

  logic [3:0] d4;   logic [1:0] q4;   logic m4;
  logic [7:0] d8;   logic [2:0] q8;   logic m8;
  logic [15:0] d16; logic [3:0] q16;  logic m16;
  logic [31:0] d32; logic [4:0] q32;  logic m32;
  logic [63:0] d64; logic [5:0] q64;  logic m64;
  logic [2047:0] dk; logic [10:0] qk; logic mk;

  pe_leaf #(.L(4))  u4  (.d(d4),  .q(q4),  .m(m4));
  pe_leaf #(.L(8))  u8  (.d(d8),  .q(q8),  .m(m8));
  pe_leaf #(.L(16)) u16 (.d(d16), .q(q16), .m(m16));
  pe_2d   #(.L(32)) u32 (.d(d32), .q(q32), .m(m32));
  pe_2d   #(.L(64)) u64 (.d(d64), .q(q64), .m(m64));
  pe_2d             uk  (.d(dk),  .q(qk),  .m(mk));

  function automatic int hi(input logic [2047:0] v, input int n);
    int r = -1;
    for (int i = 0; i < n; i++) if (v[i]) r = i;
    return r;
  endfunction

  task automatic chk(input string nm, input int exp_q, input int got_q, input logic got_m);
    checks++;
    if ((exp_q < 0 && got_m) || (exp_q >= 0 && (!got_m || got_q != exp_q))) begin
      failures++;
      if (failures < 10) $display("FAIL %s exp %0d got q=%0d m=%0d", nm, exp_q, got_q, got_m);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v); #1; chk("pe4", hi(2048'(v), 4), int'(q4), m4);
    end
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v); #1; chk("pe8", hi(2048'(v), 8), int'(q8), m8);
    end
    for (int t = 0; t < 400; t++) begin
      d16 = 16'($urandom) >> ($urandom % 16);
      d32 = 32'($urandom) >> ($urandom % 32);
      d64 = {32'($urandom), 32'($urandom)} >> ($urandom % 64);
      dk  = '0;
      for (int k = 0; k < 1 + int'($urandom % 4); k++) dk[$urandom % 2048] = 1'b1;
      if (t == 0) dk = '0;
      if (t == 1) dk = '1;
      #1;
      chk("pe16", hi(2048'(d16), 16), int'(q16), m16);
      chk("pe32", hi(2048'(d32), 32), int'(q32), m32);
      chk("pe64", hi(2048'(d64), 64), int'(q64), m64);
      chk("pe2k", hi(dk, 2048), int'(qk), mk);
    end
    // single bits everywhere in the 2048-bit tree
    for (int i = 0; i < 2048; i += 7) begin
      dk = '0; dk[i] = 1'b1; #1; chk("pe2k-one", i, int'(qk), mk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
