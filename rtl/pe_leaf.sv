// pe_leaf: small priority encoders PE4, PE8 and PE16, the leaves of the
// 1D-to-2D priority-encoder tree.
//
// Each returns q, the index of the highest-numbered set bit of d, and m, set
// when any bit of d is set. All are purely combinational. PE8 is written
// from the document's optimised sum-of-products expressions; PE4 uses the
// equivalent two-level form derived from its truth table; PE16 is written as
// a priority loop (the same function as its printed expressions), a choice
// of this design.
module pe_leaf #(
  parameter int unsigned L = 8  // 4, 8 or 16
) (
  input  logic [L-1:0]         d,
  output logic [$clog2(L)-1:0] q,
  output logic                 m
);
  if (L == 4) begin : g_pe4
    assign q[1] = d[3] | d[2];
    assign q[0] = d[3] | (~d[2] & d[1]);
  end else if (L == 8) begin : g_pe8
    assign q[0] = (~d[6] & ((~d[4] & ~d[2] & d[1]) | (~d[4] & d[3]) | d[5])) | d[7];
    assign q[1] = (~d[5] & ~d[4] & (d[2] | d[3])) | d[6] | d[7];
    assign q[2] = d[4] | d[5] | d[6] | d[7];
  end else begin : g_pe16
    always_comb begin
      q = '0;
      for (int unsigned i = 0; i < L; i++)
        if (d[i]) q = ($clog2(L))'(i);
    end
  end
  assign m = |d;
endmodule
