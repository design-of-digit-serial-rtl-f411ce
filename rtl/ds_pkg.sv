// ds_pkg: types and helper functions shared by the digit-serial MCM and FIR blocks.
//
// An A-operation computes w = (u << lu) + (v << lv), or w = (u << lu) - (v << lv)
// when `sub` is set, where u and v are indices of already computed nodes of the
// multiplier network (node 0 is the input x itself) and lu, lv are left shifts.
// The right shift of the general A-operation is always zero here: in a
// digit-serial network a right shift would need extra control logic, so
// operation lists that use one are not supported. The absolute value of the
// general A-operation is replaced by the rule that a subtraction must have a
// positive result (the minuend is written first).
package ds_pkg;

  // Widths of the fields of one A-operation. 10-bit node indices allow
  // networks of up to 1023 operations, 6-bit shifts allow shifts up to 63.
  localparam int unsigned NODE_W  = 10;
  localparam int unsigned SHIFT_W = 6;

  typedef struct packed {
    logic [NODE_W-1:0]  u;    // first operand: node index
    logic [SHIFT_W-1:0] lu;   // left shift of the first operand
    logic [NODE_W-1:0]  v;    // second operand: node index
    logic [SHIFT_W-1:0] lv;   // left shift of the second operand
    logic               sub;  // 1: u<<lu - v<<lv, 0: u<<lu + v<<lv
  } aop_t;

  // How the constant multiplications of the FIR multiplier block are built.
  typedef enum logic {
    ARCH_SHIFT_ADDS = 1'b0,   // shared digit-serial add/sub/shift network
    ARCH_CONST_MULT = 1'b1    // one sequential constant multiplier per constant
  } arch_e;

  // Number of bits needed to write the non-negative value v in binary.
  function automatic int unsigned bitlen(longint unsigned v);
    int unsigned n = 0;
    while (v != 0) begin
      n++;
      v >>= 1;
    end
    return n;
  endfunction

  // Ceiling of a / b for positive integers.
  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Odd part of a non-zero magnitude and the power of two removed from it.
  function automatic longint unsigned odd_part(longint unsigned v);
    if (v == 0) return 0;
    while (v[0] == 1'b0) v >>= 1;
    return v;
  endfunction

  function automatic int unsigned even_shift(longint unsigned v);
    int unsigned e = 0;
    if (v == 0) return 0;
    while (v[0] == 1'b0) begin
      v >>= 1;
      e++;
    end
    return e;
  endfunction

  // Helper to write operation lists compactly.
  function automatic aop_t aop(logic [NODE_W-1:0] u, logic [SHIFT_W-1:0] lu,
                               logic [NODE_W-1:0] v, logic [SHIFT_W-1:0] lv,
                               logic sub);
    return '{u: u, lu: lu, v: v, lv: lv, sub: sub};
  endfunction

endpackage
