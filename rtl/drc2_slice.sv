// drc2_slice: operation decoder and result select of one memory slice.
//
// Each slice gets its own operation code every cycle, which lets different slices of one
// array compute different functions of the same selected rows. The slice drives ADDEN of its
// periphery (drc2_slice_io) and, for single-cycle operations, selects the result:
//   RD = RBLT, RD_NOT = RBLF, RD_0 = 0, RD_1 = 1, NOR = RBLF, OR = NOT RBLF,
//   AND = RBLT, NAND = NOT RBLT, XOR/COMP = O3, NXOR = O2, IMP (mixed operation) = O1.
// For word-wise arithmetic it hands the generate-bar (O1), the propagate (O2) and the half sum
// A xor B to the ripple-carry adder; with ADDEN=1 O3 is the inverted half sum and is inverted
// back here. The read value RBLT is handed to the shifter. Purely combinational.
// The mapping of operations onto ports follows the design's access modes; the operation
// encoding is this design's own (drc2_pkg::op_e).
module drc2_slice
  import drc2_pkg::*;
(
  input  op_e  op,
  input  logic rblf,
  input  logic rblt,
  output logic logic_out,
  output logic g_n,
  output logic p,
  output logic s_int
);
  logic adden, o1, o2, o3;

  assign adden = op_adden(op);

  drc2_slice_io u_io (
    .rblf  (rblf),
    .rblt  (rblt),
    .adden (adden),
    .o1    (o1),
    .o2    (o2),
    .o3    (o3)
  );

  always_comb begin
    case (op)
      OP_RD:     logic_out = rblt;
      OP_RD_NOT: logic_out = rblf;
      OP_RD_1:   logic_out = 1'b1;
      OP_NOR:    logic_out = rblf;
      OP_OR:     logic_out = ~rblf;
      OP_AND:    logic_out = rblt;
      OP_NAND:   logic_out = ~rblt;
      OP_XOR:    logic_out = o3;
      OP_NXOR:   logic_out = o2;
      OP_IMP:    logic_out = o1;
      default:   logic_out = 1'b0;   // RD_0, NOP and multi-cycle operations
    endcase
  end

  assign g_n   = o1;
  assign p     = o2;
  assign s_int = adden ? ~o3 : o3;
endmodule
