// tb_top_body.svh: body shared by the end-to-end testbenches of
// bi_analytics_top. The including module declares NW, BIC_OPS_N, ROWS_N,
// BIQP_OPS_N, SEG_N, the clock/reset, the DUT ports and the two memory
// models (bmem for the creator, qmem for the query processor).
//
// Flow, after the document's analytics experiment: four 16-bit attributes
// of NW records are indexed by the creator with five operations (a range
// query of four keys and an EQ), giving four BI vectors; the testbench, in
// the host's role, copies them into the query processor's memory as one
// batch of four rows, and the query processor answers a six-operation query
// (CR, OR, AND, OR, AND, EQ), first storing the raw bitmap, then the encoded
// positions. Both are compared with the query evaluated directly on the
// attribute values. Cycle counts are printed next to the document's timing
// model.

  localparam int BUS = 256, LANES = 16, BEATS = NW / LANES, VB = NW / BUS;
  int checks = 0, failures = 0;
  logic [15:0] attr [4][NW];
  logic [NW-1:0] want;
  int bic_cyc, biqp_raw_cyc, biqp_enc_cyc;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  task automatic bic_job(input int nops, input int nbatch, input int obase);
    @(negedge clk);
    bic_ops_base = 0; bic_ops_count = 16'(nops); bic_data_base = 1000;
    bic_batches = 16'(nbatch); bic_out_base = 32'(obase);
    bic_start = 1;
    @(negedge clk); bic_start = 0;
    wait (bic_done);
    @(negedge clk);
  endtask

  task automatic biqp_job(input int nops, input int nbr, input bit enc, input int obase);
    @(negedge clk);
    biqp_ops_base = 0; biqp_ops_count = 16'(nops); biqp_bim_base = 1000; biqp_nb = 16'(nbr);
    biqp_batches = 1; biqp_out_base = 32'(obase); biqp_enc_en = enc;
    biqp_start = 1;
    @(negedge clk); biqp_start = 0;
    wait (biqp_done);
    @(negedge clk);
  endtask

  function automatic bit in_range(input logic [15:0] v);
    return v >= 19 && v <= 22;
  endfunction

  initial begin
    logic [31:0] bops [5];
    logic [15:0] qops [6];
    logic [NW-1:0] got;
    int w, t_opm, t_cam, t_theo, n_pos;
    bic_start = 0; biqp_start = 0;
    bic_ops_base = 0; bic_ops_count = 0; bic_data_base = 0; bic_batches = 0; bic_out_base = 0;
    biqp_ops_base = 0; biqp_ops_count = 0; biqp_bim_base = 0; biqp_nb = 0; biqp_batches = 0;
    biqp_out_base = 0; biqp_enc_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- data and creator operations ----
    for (int a = 0; a < 4; a++) begin
      for (int n = 0; n < NW; n++) attr[a][n] = 16'(10 + $urandom % 30);
      for (int b = 0; b < BEATS; b++) begin
        logic [255:0] d;
        for (int l = 0; l < LANES; l++) d[l*16 +: 16] = attr[a][b*LANES + l];
        bmem.poke(32'(1000 + a*BEATS + b), d);
      end
    end
    for (int k = 0; k < 4; k++) bops[k] = bi_pkg::bic_op(16'(19 + k), 1, 0, 0);
    bops[4] = bi_pkg::bic_op(16'd0, 0, 0, 1);
    begin
      logic [255:0] d;
      d = '0;
      for (int k = 0; k < 5; k++) d[k*32 +: 32] = bops[k];
      bmem.poke(0, d);
    end
    bic_job(5, 4, 100000);
    bic_cyc = int'(bic_cycles);
    t_opm = 1; t_cam = 2 * BEATS;
    t_theo = t_opm + (t_cam + 5 + VB) * 4;
    $display("BIC: 4 batches of %0d words, %0d cycles (document's model %0d)", NW, bic_cyc, t_theo);
    // check the four BI vectors and move them (host role) to the query memory
    for (int a = 0; a < 4; a++) begin
      logic [NW-1:0] e;
      for (int n = 0; n < NW; n++) e[n] = in_range(attr[a][n]);
      for (int k = 0; k < VB; k++) begin
        got[k*BUS +: BUS] = bmem.peek(32'(100000 + a*VB + k));
        qmem.poke(32'(1000 + a*VB + k), got[k*BUS +: BUS]);
      end
      checks++;
      if (got != e) fail($sformatf("BI vector of attribute %0d", a));
    end
    // ---- query: ((A0 & A1) | A2) & A3 ----
    qops[0] = bi_pkg::biqp_op(9'd0, bi_pkg::Q_CR);
    qops[1] = bi_pkg::biqp_op(9'd0, bi_pkg::Q_OR);
    qops[2] = bi_pkg::biqp_op(9'd1, bi_pkg::Q_AN);
    qops[3] = bi_pkg::biqp_op(9'd2, bi_pkg::Q_OR);
    qops[4] = bi_pkg::biqp_op(9'd3, bi_pkg::Q_AN);
    qops[5] = bi_pkg::biqp_op(9'd0, bi_pkg::Q_EQ);
    begin
      logic [255:0] d;
      d = '0;
      for (int k = 0; k < 6; k++) d[k*16 +: 16] = qops[k];
      qmem.poke(0, d);
    end
    for (int n = 0; n < NW; n++)
      want[n] = ((in_range(attr[0][n]) && in_range(attr[1][n])) || in_range(attr[2][n])) && in_range(attr[3][n]);
    biqp_job(6, 4, 0, 200000);
    biqp_raw_cyc = int'(biqp_cycles);
    for (int k = 0; k < VB; k++) got[k*BUS +: BUS] = qmem.peek(32'(200000 + k));
    checks++;
    if (got != want) fail("raw query result");
    $display("BIQP raw: %0d cycles (document's model %0d)", biqp_raw_cyc, 1 + 4*VB + 6 + VB);
    biqp_job(6, 4, 1, 300000);
    biqp_enc_cyc = int'(biqp_cycles);
    got = '0; w = 300000; n_pos = 0;
    begin
      bit fin;
      fin = 0;
      // bounded: at most NW/16 full words of positions plus the terminator word
      while (!fin && w < 300000 + NW / 16 + 1) begin
        logic [255:0] d;
        d = qmem.peek(32'(w)); w++;
        for (int k = 0; k < 16; k++)
          if (!fin) begin
            if (d[k*16 +: 16] == bi_pkg::ENC_TERM) fin = 1;
            else begin got[d[k*16 +: 15]] = 1'b1; n_pos++; end
          end
      end
    end
    checks++;
    if (got != want) fail("encoded query result");
    checks++;
    if (n_pos != $countones(want) || int'(biqp_matches) != n_pos) fail("match count");
    $display("BIQP encoded: %0d matches, %0d cycles (document's model %0d)", n_pos, biqp_enc_cyc,
             1 + 4*VB + 6 + (NW/SEG_N)*1 + n_pos + (NW/SEG_N - 1)*2);
