// pe_2d: large priority encoder built by 1D-to-2D conversion.
//
// The L-bit input is viewed as an (L/4) x 4 array: row r holds bits
// d[4r+3:4r]. Each row is ORed into a row-status bit; a PE of L/4 bits (this
// module again, down to a PE16 or PE8 leaf) finds the highest active row i,
// a multiplexer picks that row and a PE4 finds its highest bit j, and the
// result is q = {i, j} = 4*i + j. Column width M = 4 is the document's
// preferred choice. The column multiplexer is written as an AND-OR over the
// one-hot decode of i, so the row-status vector drives it directly (the
// look-ahead idea); the result is the same as indexing by i.
// Purely combinational; q is the index of the highest-numbered set bit,
// m is set when any bit is set. L must be a power of two, at least 4.
// Lint note: when the module instantiates itself (L above 64), Verilator's
// lint reports row_q and row_m as undriven and row_or as unused. They are
// driven through the u_rows instance. The warning disappears for sizes that
// need no self-instantiation, and simulation of the 2048-bit tree checks every
// output against a reference.
module pe_2d #(
  parameter int unsigned L = 2048
) (
  input  logic [L-1:0]         d,
  output logic [$clog2(L)-1:0] q,
  output logic                 m
);
  if (L <= 16) begin : g_leaf
    pe_leaf #(.L(L)) u_leaf (.d(d), .q(q), .m(m));
  end else begin : g_tree
    localparam int unsigned N  = L / 4;
    localparam int unsigned NW = $clog2(N);
    logic [N-1:0]  row_or;
    logic [NW-1:0] row_q;
    logic          row_m;
    logic [3:0]    col;
    logic [1:0]    col_q;
    logic          col_m;

    for (genvar r = 0; r < N; r++) begin : g_row
      assign row_or[r] = |d[4*r +: 4];
    end

    pe_2d #(.L(N)) u_rows (.d(row_or), .q(row_q), .m(row_m));

    always_comb begin
      col = '0;
      for (int unsigned r = 0; r < N; r++)
        col |= d[4*r +: 4] & {4{row_q == NW'(r)}};
    end

    pe_leaf #(.L(4)) u_col (.d(col), .q(col_q), .m(col_m));

    assign q = {row_q, col_q};
    assign m = row_m;
  end
endmodule
