// drc2_slice_io: column periphery of one memory slice (sense inverters, ADDEN mux, NAND cascade).
//
// The read bit lines RBLF and RBLT of a column enter a multiplexer controlled by ADDEN that
// passes RBLF (ADDEN=0) or its inverse (ADDEN=1), and a cascade of three NAND gates forms
//   O1 = NAND(m, RBLT)          O2 = NAND(NOT m, NOT RBLT)          O3 = NAND(O1, O2)
// where m is the mux output. Depending on how the rows were accessed this gives:
//   rows on both ports, ADDEN=0 : O1 = '1', O2 = NXOR (all equal), O3 = XOR / COMP
//   rows on one port each       : O1 = mixed operation, NOR(F rows) NAND AND(T rows)
//   A on port F, B on port T    : ADDEN=0: O1 = NOT(NOT A.B) (borrow generate, inverted),
//                                  O2 = NOT A + B (borrow propagate), O3 = A xor B
//                                  ADDEN=1: O1 = NAND(A,B) (carry generate, inverted),
//                                  O2 = A + B (carry propagate), O3 = NOT(A xor B)
// The blocks (mux, inverters, NAND cascade) and the output table follow the design's periphery
// description; the exact gate-to-gate wiring was chosen so that every row of that table holds.
// Purely combinational, evaluated in the read cycle.
module drc2_slice_io (
  input  logic rblf,
  input  logic rblt,
  input  logic adden,
  output logic o1,
  output logic o2,
  output logic o3
);
  logic m;
  assign m  = adden ? ~rblf : rblf;
  assign o1 = ~(m & rblt);
  assign o2 = ~(~m & ~rblt);
  assign o3 = ~(o1 & o2);
endmodule
