// drc2_pkg: operation codes and shared helpers of the DRC2 in-memory computing macro.
//
// Every memory slice (one column of the bitcell array with its periphery) receives one of
// these operation codes per cycle, so different slices of the same array can run different
// operations on the same selected rows. The list follows the operation table of the design:
// memory reads, N-operand logic, shift and word-wise arithmetic. SHIFT is split into SHL and
// SHR here, and the numeric encoding is this design's own.
package drc2_pkg;

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,   // slice idle, produces nothing
    OP_RD      = 5'd1,   // read through RBLT (rows on port T)
    OP_RD_NOT  = 5'd2,   // read the complement through RBLF (rows on port F)
    OP_RD_0    = 5'd3,   // read as '0'
    OP_RD_1    = 5'd4,   // read as '1'
    OP_XOR     = 5'd5,   // XOR of two rows, COMP (not all equal) of more (rows on both ports)
    OP_NXOR    = 5'd6,   // NXOR, 'all equal' for more than two rows (rows on both ports)
    OP_NOR     = 5'd7,   // NOR of the rows on port F
    OP_NAND    = 5'd8,   // NAND of the rows on port T
    OP_OR      = 5'd9,   // OR of the rows on port F
    OP_AND     = 5'd10,  // AND of the rows on port T
    OP_IMP     = 5'd11,  // mixed operation: OR(F rows) | NAND(T rows); T -> F for one row each
    OP_SHL     = 5'd12,  // word shifted one bit toward the MSB (row on port T), 2 cycles
    OP_SHR     = 5'd13,  // word shifted one bit toward the LSB (row on port T), 2 cycles
    OP_ADD     = 5'd14,  // A (port F) + B (port T), 3 cycles
    OP_SUB     = 5'd15,  // A (port F) - B (port T), 3 cycles
    OP_INC     = 5'd16,  // A (port F) + 1, saturating, no row on port T, 3 cycles
    OP_DEC     = 5'd17,  // A (port F) - 1, saturating, no row on port T, 3 cycles
    OP_GT      = 5'd18,  // A > B unsigned, result in the word LSB, 2 cycles
    OP_LT      = 5'd19   // A < B unsigned, result in the word LSB, 2 cycles
  } op_e;

  // Kind of word-wise operation handled by the ripple-carry adder.
  typedef enum logic [2:0] {
    AK_ADD = 3'd0,
    AK_SUB = 3'd1,
    AK_INC = 3'd2,
    AK_DEC = 3'd3,
    AK_GT  = 3'd4,
    AK_LT  = 3'd5
  } arith_e;

  // Number of cycles from array access to result, per operation (0 for NOP).
  function automatic int unsigned op_latency(op_e op);
    case (op)
      OP_NOP:                         return 0;
      OP_SHL, OP_SHR, OP_GT, OP_LT:   return 2;
      OP_ADD, OP_SUB, OP_INC, OP_DEC: return 3;
      default:                        return 1;
    endcase
  endfunction

  function automatic logic is_arith(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_INC, OP_DEC, OP_GT, OP_LT};
  endfunction

  function automatic logic is_shift(op_e op);
    return op inside {OP_SHL, OP_SHR};
  endfunction

  // ADDEN is raised only for additions: ADD, and DEC which adds the all-ones word.
  function automatic logic op_adden(op_e op);
    return op inside {OP_ADD, OP_DEC};
  endfunction

  function automatic arith_e arith_kind(op_e op);
    case (op)
      OP_SUB:  return AK_SUB;
      OP_INC:  return AK_INC;
      OP_DEC:  return AK_DEC;
      OP_GT:   return AK_GT;
      OP_LT:   return AK_LT;
      default: return AK_ADD;
    endcase
  endfunction

endpackage
