// Shared types and constants of the low power logical element (LE).
//
// The LE takes a 3-bit data word {D0, D1, Cin}. Throughout this design the
// word is packed with D0 as the most significant bit, so the LUT address of a
// data word is its row number in the usual truth table ordered D0, D1, Cin.
//
// An LE is configured by writing a le_cfg_t: one 8-bit truth table for the
// Sum output, one for the Carry output, and a flag that turns the
// 0/1 path separation (data re-organization) on. The separation is exact only
// for functions whose result does not depend on the order of the input bits,
// so the flag must stay off for the others (INV, less/greater than, shifts).
//
// op_cfg() gives the configuration of each operation the LE is meant to
// carry. The list of operations follows the document; their exact truth
// tables for the single-bit compare, shift and multiply elements are this
// design's own choice (see the comment on each).
package le_pkg;

  // Data word: [2] = D0, [1] = D1, [0] = Cin.
  typedef logic [2:0] le_data_t;

  localparam int unsigned LUT_ENTRIES = 8;   // 2^3 data combinations
  localparam int unsigned NUM_FLOPS   = 4;   // storage elements per LE

  typedef struct packed {
    logic [LUT_ENTRIES-1:0] sum_lut;    // bit i = Sum for data word i
    logic [LUT_ENTRIES-1:0] carry_lut;  // bit i = Carry for data word i
    logic                   reorg_en;   // 1: separate 0/1 paths
  } le_cfg_t;

  // Output select codes: 0..3 pick flip-flop 0..3, OSEL_LUT picks Sum directly.
  typedef enum logic [2:0] {
    OSEL_FF0 = 3'd0,
    OSEL_FF1 = 3'd1,
    OSEL_FF2 = 3'd2,
    OSEL_FF3 = 3'd3,
    OSEL_LUT = 3'd4
  } le_osel_e;

  typedef enum logic [3:0] {
    OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR, OP_XNOR, OP_INV,
    OP_ADD, OP_CMP_EQ, OP_CMP_LT, OP_CMP_GT, OP_SHL, OP_SHR, OP_MULT
  } le_op_e;

  // The re-organization of the document: D0 becomes 1 when any input is 1,
  // D1 when at least two are, Cin only when all three are.
  function automatic le_data_t reorg(le_data_t d);
    logic d0, d1, ci;
    {d0, d1, ci} = d;
    return {d0 | d1 | ci, (d0 & d1) | (ci & (d0 ^ d1)), d0 & d1 & ci};
  endfunction

  // Result {Sum, Carry} of an operation for data bits d0, d1, ci.
  //  Logic operations use D0 and D1 only; Carry is 0. INV inverts D0.
  //  ADD        : full adder.
  //  CMP_EQ/LT/GT: single-bit compare of D0 with D1 on Sum; Carry is 0.
  //  SHL        : Sum takes Cin (bit from the less significant neighbour),
  //               Carry passes D0 on to the more significant neighbour.
  //  SHR        : Sum takes D1 (bit from the more significant neighbour),
  //               Carry passes D0 on to the less significant neighbour.
  //  MULT       : one-bit product D0*D1 on Sum; Carry is 0.
  function automatic logic [1:0] op_eval(le_op_e op, logic d0, logic d1, logic ci);
    case (op)
      OP_AND:    return {d0 & d1, 1'b0};
      OP_OR:     return {d0 | d1, 1'b0};
      OP_NAND:   return {~(d0 & d1), 1'b0};
      OP_NOR:    return {~(d0 | d1), 1'b0};
      OP_XOR:    return {d0 ^ d1, 1'b0};
      OP_XNOR:   return {~(d0 ^ d1), 1'b0};
      OP_INV:    return {~d0, 1'b0};
      OP_ADD:    return {d0 ^ d1 ^ ci, (d0 & d1) | (ci & (d0 ^ d1))};
      OP_CMP_EQ: return {~(d0 ^ d1), 1'b0};
      OP_CMP_LT: return {~d0 & d1, 1'b0};
      OP_CMP_GT: return {d0 & ~d1, 1'b0};
      OP_SHL:    return {ci, d0};
      OP_SHR:    return {d1, d0};
      OP_MULT:   return {d0 & d1, 1'b0};
      default:   return 2'b00;
    endcase
  endfunction

  // True for the operations whose result does not depend on the order of
  // the data bits they use, so that the 0/1 path separation may be applied.
  function automatic logic op_commutative(le_op_e op);
    case (op)
      OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR, OP_XNOR,
      OP_ADD, OP_CMP_EQ, OP_MULT: return 1'b1;
      default:                    return 1'b0;
    endcase
  endfunction

  // True for the operations that read Cin. The two-input operations need
  // Cin held at 0 while the separation is on: the re-organization sorts all
  // three bits, so a 1 on Cin would be moved into D0 or D1.
  function automatic logic op_uses_cin(le_op_e op);
    return (op == OP_ADD) || (op == OP_SHL);
  endfunction

  function automatic le_cfg_t op_cfg(le_op_e op);
    le_cfg_t    c;
    logic [1:0] r;
    for (int i = 0; i < int'(LUT_ENTRIES); i++) begin
      r = op_eval(op, i[2], i[1], i[0]);
      c.sum_lut[i]   = r[1];
      c.carry_lut[i] = r[0];
    end
    c.reorg_en = op_commutative(op);
    return c;
  endfunction

endpackage
