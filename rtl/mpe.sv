// mpe: multi-match priority encoder.
//
// A register REG is loaded with the input e while en is high. Every later
// cycle a priority encoder (pe_2d) finds one set bit of REG and reports it on
// q with m = 1; when adv is high that bit is cleared through a decoder, so
// the next match appears in the following cycle: one match per clock. When
// REG is empty m is 0.
// Matches come out in ascending bit order (bit 0 first). The encoder tree
// itself favours the highest-numbered input, so REG is fed to it bit-reversed
// and its result inverted; that ordering is this design's reading of the
// document's example output sequence.
// 'last' is high when the current match is the only bit left, so a
// controller can move on without an extra cycle to see REG empty.
module mpe #(
  parameter int unsigned L = 2048
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [L-1:0]         e,
  input  logic                 adv,
  output logic [$clog2(L)-1:0] q,
  output logic                 m,
  output logic                 last
);
  localparam int unsigned QW = $clog2(L);
  logic [L-1:0]  reg_d, rev, clr;
  logic [QW-1:0] pq;

  always_comb
    for (int unsigned i = 0; i < L; i++) rev[i] = reg_d[L-1-i];

  pe_2d #(.L(L)) u_pe (.d(rev), .q(pq), .m(m));

  assign q   = ~pq;
  assign clr = L'(1) << q;
  assign last = m && ((reg_d & ~clr) == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          reg_d <= '0;
    else if (en)         reg_d <= e;
    else if (adv && m)   reg_d <= reg_d & ~clr;
endmodule
