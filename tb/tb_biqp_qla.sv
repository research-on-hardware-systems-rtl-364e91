// tb_biqp_qla: self-checking test of the query-processor logic array at
// 512 bits. A small memory model stands in for the BIM (one-cycle read,
// LD writes); random sequences of all operations (AN, OR, XO, their NI
// forms, CR, NO, LD, EQ) run back to back and RR is compared with a
// reference after every operation. Covers the LD-then-read forwarding case
// and the EQ stall while the output buffer is busy (both counted and
// required); each EQ's buffer is compared with the reference.
module tb_biqp_qla;
  import bi_pkg::*;
  localparam int NB = 512, ROWS = 8;
  int checks = 0, failures = 0, n_stall = 0, n_fwd = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_valid = 0, stall, ld_en, obuf_busy, obuf_free = 0;
  logic [15:0] op;
  logic [8:0] ld_row;
  logic [NB-1:0] bim_row, rr, obuf;
  logic [NB-1:0] mem [ROWS];
  logic [NB-1:0] ref_mem [ROWS];

  biqp_qla #(.NBITS(NB)) dut (.clk, .rst_n, .op_valid, .op, .bim_row, .stall, .ld_en, .ld_row,
    .rr, .obuf_busy, .obuf, .obuf_free);

  function automatic logic [NB-1:0] rv();
    logic [NB-1:0] v;
    for (int i = 0; i < NB / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // BIM stand-in: the read for an operation is issued one cycle ahead
  logic [2:0] next_row;
  always @(posedge clk) begin
    if (!stall) bim_row <= mem[next_row];
    if (ld_en) mem[ld_row[2:0]] <= rr;
  end

  // output stage stand-in: frees the buffer a few cycles after EQ
  int busy_cnt = 0;
  always @(posedge clk) begin
    obuf_free <= 1'b0;
    if (obuf_busy && !obuf_free) begin
      busy_cnt++;
      if (busy_cnt == 3) begin obuf_free <= 1'b1; busy_cnt = 0; end
    end
  end

  logic [NB-1:0] rr_ref, eq_ref;
  biqp_code_e codes [10] = '{Q_AN, Q_OR, Q_XO, Q_NA, Q_NR, Q_NX, Q_CR, Q_NO, Q_LD, Q_EQ};

  initial begin
    biqp_code_e c;
    int r, prev_ld;
    for (int i = 0; i < ROWS; i++) begin mem[i] = rv(); ref_mem[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    rr_ref = '0; prev_ld = -1;
    // first operation's row is read a cycle ahead
    r = $urandom % ROWS; next_row = 3'(r);
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      int nr;
      c = codes[$urandom % 10];
      if (t % 17 == 5) c = Q_LD;
      if (t % 17 == 6 && prev_ld >= 0) begin c = Q_OR; r = prev_ld; end
      if (t % 23 == 3 || t % 23 == 4) c = Q_EQ;
      op_valid = 1; op = biqp_op(9'(r), c);
      nr = $urandom % ROWS;
      if (t % 17 == 5) nr = r;          // next op will read the row just written
      next_row = 3'(nr);
      #1;
      while (stall) begin n_stall++; @(negedge clk); #1; end
      if (c == Q_OR && prev_ld == r) n_fwd++;
      unique case (c)
        Q_AN: rr_ref = rr_ref & ref_mem[r];
        Q_OR: rr_ref = rr_ref | ref_mem[r];
        Q_XO: rr_ref = rr_ref ^ ref_mem[r];
        Q_NA: rr_ref = rr_ref & ~ref_mem[r];
        Q_NR: rr_ref = rr_ref | ~ref_mem[r];
        Q_NX: rr_ref = rr_ref ^ ~ref_mem[r];
        Q_CR: rr_ref = '0;
        Q_NO: rr_ref = ~rr_ref;
        Q_LD: ref_mem[r] = rr_ref;
        Q_EQ: eq_ref = rr_ref;
        default: ;
      endcase
      prev_ld = (c == Q_LD) ? r : -1;
      @(posedge clk); #1;
      checks++;
      if (rr != rr_ref) begin failures++; if (failures < 10) $display("FAIL rr t=%0d op %s", t, c.name()); end
      if (c == Q_EQ) begin
        checks++;
        if (obuf != eq_ref) begin failures++; $display("FAIL obuf t=%0d", t); end
      end
      r = nr;
      @(negedge clk);
    end
    op_valid = 0;
    checks++;
    if (n_stall == 0 || n_fwd == 0) begin failures++; $display("FAIL stall %0d fwd %0d", n_stall, n_fwd); end
    $display("stall cycles %0d, forwarded reads %0d", n_stall, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
