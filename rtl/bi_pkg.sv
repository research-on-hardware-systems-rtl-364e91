// bi_pkg: constants and operation encodings shared by the bitmap-index
// creator (BIC), query processor (BIQP) and encoder (BIE).
//
// BIC operations are 32-bit words {key[31:16], reserved[15:3], EQ, NO, OR}
// as in the BIC operation-memory word layout. BIQP operations are 16-bit
// words {BIM row[15:7], reserved[6:4], code[3:0]}; code[3]=0 selects the
// logical group (AN/OR/XO, with code[2] inverting the BIM row: NI), code[3]=1
// the control group (CR, NO, LD, EQ). The 4-bit codes follow the document's
// table; the helper functions are this design's own.
package bi_pkg;

  // ---------------- BIC operation word ----------------
  localparam int unsigned BIC_OP_W = 32;
  localparam int unsigned BIC_OR_BIT = 0;
  localparam int unsigned BIC_NO_BIT = 1;
  localparam int unsigned BIC_EQ_BIT = 2;

  function automatic logic [15:0] bic_key(input logic [31:0] op);
    return op[31:16];
  endfunction

  function automatic logic [31:0] bic_op(input logic [15:0] key, input logic is_or,
                                         input logic is_no, input logic is_eq);
    return {key, 13'd0, is_eq, is_no, is_or};
  endfunction

  // ---------------- BIQP operation word ----------------
  localparam int unsigned BIQP_OP_W = 16;

  typedef enum logic [3:0] {
    Q_AN = 4'b0000,  // RR <= RR AND row
    Q_OR = 4'b0001,  // RR <= RR OR row
    Q_XO = 4'b0010,  // RR <= RR XOR row
    Q_NA = 4'b0100,  // NI with AN: RR <= RR AND ~row
    Q_NR = 4'b0101,  // NI with OR: RR <= RR OR ~row
    Q_NX = 4'b0110,  // NI with XO: RR <= RR XOR ~row
    Q_CR = 4'b1000,  // RR <= 0
    Q_NO = 4'b1001,  // RR <= ~RR
    Q_LD = 4'b1010,  // BIM[row] <= RR
    Q_EQ = 4'b1100   // RR -> memory (raw or encoded)
  } biqp_code_e;

  typedef struct packed {
    logic [8:0] row;
    logic [2:0] rsvd;
    logic [3:0] code;
  } biqp_op_t;

  function automatic logic [15:0] biqp_op(input logic [8:0] row, input biqp_code_e code);
    biqp_op_t o;
    o.row  = row;
    o.rsvd = 3'd0;
    o.code = code;
    return o;
  endfunction

  // Encoded-result terminator slot (positions are at most 15 bits).
  localparam logic [15:0] ENC_TERM = 16'hFFFF;

endpackage
