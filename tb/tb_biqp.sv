// tb_biqp: self-checking test of the query processor with its encoder, at
// 1024-bit BI vectors, 16 BIM rows, 64 operations and 64-bit encoder
// segments (16 segments per result, as in the full-size system), against
// the behavioural memory. A query program in the style of the document's
// example (CR, then AND / OR / XOR with and without NI on BIM rows, NO, an
// LD into a spare row read back at once, EQs back to back) runs on two
// batches. Job 1 stores raw results without memory stalls and checks the
// cycle count; jobs 2 and 3 store encoded positions (with and without
// memory stalls), whose lists are decoded and compared with the reference.
module tb_biqp;
  import bi_pkg::*;
  localparam int NB = 1024, ROWS = 16, BUS = 256, U = NB / BUS, NOPS = 64;
  int checks = 0, failures = 0, n_stall = 0, n_pos_stall = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, ready, done, stall_en = 0, enc_en = 0;
  logic [31:0] cycles, n_matches;
  logic [15:0] ops_count, nb, batches;
  logic mem_rd_req, mem_rd_ready, mem_rd_valid, mem_wr_req, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr;
  logic [255:0] mem_rd_data, mem_wr_data;

  biqp #(.NBITS(NB), .ROWS(ROWS), .NOPS(NOPS), .SEG_W(64)) dut (.clk, .rst_n, .start,
    .ops_base(32'd0), .ops_count, .bim_base(32'd200), .nb, .batches, .out_base(32'd5000), .enc_en,
    .ready, .done, .cycles, .n_matches,
    .mem_rd_req, .mem_rd_addr, .mem_rd_ready, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_ready);
  ddr_model mem (.clk, .rst_n, .stall_en, .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_ready(mem_rd_ready),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data), .wr_req(mem_wr_req), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_ready(mem_wr_ready));

  always @(posedge clk) begin
    if (dut.stall) n_stall++;
    if (dut.pos_valid && !dut.pos_ready) n_pos_stall++;
  end

  logic [15:0] prog [$];
  logic [NB-1:0] rows [2][ROWS];
  logic [NB-1:0] results [$];

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  function automatic logic [NB-1:0] rv(input int density);
    logic [NB-1:0] v;
    for (int i = 0; i < NB; i++) v[i] = ($urandom % 100) < density;
    return v;
  endfunction

  task automatic run_job(input int B, input int nrows, input bit enc, input bit stalls);
    logic [NB-1:0] rr, m [ROWS];
    int w, lo_bound, nres;
    stall_en = stalls; enc_en = enc;
    for (int b = 0; b < B; b++)
      for (int r = 0; r < nrows; r++) begin
        rows[b][r] = rv(r == 3 ? 5 : 50);
        for (int k = 0; k < U; k++) mem.poke(32'(200 + (b*nrows + r)*U + k), rows[b][r][k*BUS +: BUS]);
      end
    prog = {};
    prog.push_back(biqp_op(9'd0, Q_CR));
    prog.push_back(biqp_op(9'd0, Q_OR));
    prog.push_back(biqp_op(9'd1, Q_AN));
    prog.push_back(biqp_op(9'd2, Q_NR));
    prog.push_back(biqp_op(9'd3, Q_AN));
    prog.push_back(biqp_op(9'd0, Q_EQ));
    prog.push_back(biqp_op(9'd0, Q_EQ));
    prog.push_back(biqp_op(9'd7, Q_LD));
    prog.push_back(biqp_op(9'd7, Q_XO));
    prog.push_back(biqp_op(9'd4, Q_NX));
    prog.push_back(biqp_op(9'd0, Q_NO));
    prog.push_back(biqp_op(9'd5, Q_NA));
    prog.push_back(biqp_op(9'd0, Q_EQ));
    for (int i = 0; i < (prog.size() + 15) / 16; i++) begin
      logic [255:0] d;
      d = '0;
      for (int k = 0; k < 16; k++) if (i*16 + k < prog.size()) d[k*16 +: 16] = prog[i*16 + k];
      mem.poke(32'(i), d);
    end
    ops_count = 16'(prog.size()); nb = 16'(nrows); batches = 16'(B);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    // reference
    results = {};
    for (int b = 0; b < B; b++) begin
      for (int r = 0; r < ROWS; r++) m[r] = (r < nrows) ? rows[b][r] : '0;
      if (b > 0) m[7] = (7 < nrows) ? rows[b][7] : m[7];
      rr = '0;
      foreach (prog[i]) begin
        biqp_op_t o;
        o = biqp_op_t'(prog[i]);
        unique case (biqp_code_e'(o.code))
          Q_AN: rr &= m[o.row]; Q_OR: rr |= m[o.row]; Q_XO: rr ^= m[o.row];
          Q_NA: rr &= ~m[o.row]; Q_NR: rr |= ~m[o.row]; Q_NX: rr ^= ~m[o.row];
          Q_CR: rr = '0; Q_NO: rr = ~rr; Q_LD: m[o.row] = rr; Q_EQ: results.push_back(rr);
          default: ;
        endcase
      end
    end
    w = 5000;
    nres = 0;
    foreach (results[i]) begin
      logic [NB-1:0] got;
      if (!enc) begin
        for (int k = 0; k < U; k++) got[k*BUS +: BUS] = mem.peek(32'(w + k));
        w += U;
      end else begin
        bit fin;
        got = '0; fin = 0;
        while (!fin) begin
          logic [255:0] d;
          d = mem.peek(32'(w)); w++;
          for (int k = 0; k < 16; k++)
            if (!fin) begin
              if (d[k*16 +: 16] == ENC_TERM) fin = 1;
              else begin
                checks++;
                if (got[d[k*16 +: 10]] || d[k*16 +: 16] >= NB) fail("repeated or bad position");
                got[d[k*16 +: 10]] = 1'b1;
              end
            end
        end
      end
      checks++;
      if (got != results[i]) fail($sformatf("result %0d (enc=%0d)", i, enc));
      nres++;
    end
    lo_bound = (prog.size() + 15) / 16 + B * (nrows * U + prog.size());
    $display("job enc=%0d stalls=%0d: %0d results, %0d cycles, minimum %0d", enc, stalls, nres, cycles, lo_bound);
    if (!stalls && !enc) begin
      checks++;
      if (int'(cycles) < lo_bound || int'(cycles) > lo_bound + 15*(B+1) + 3*U*B + 10)
        fail($sformatf("cycle count %0d", cycles));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_job(2, 8, 0, 0);
    run_job(2, 8, 1, 1);
    run_job(1, 6, 1, 0);
    checks++;
    if (n_stall == 0 || n_pos_stall == 0) fail($sformatf("EQ stalls %0d, encoder stalls %0d", n_stall, n_pos_stall));
    $display("EQ stall cycles %0d, encoder output stalls %0d", n_stall, n_pos_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
