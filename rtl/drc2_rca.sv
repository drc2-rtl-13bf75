// drc2_rca: word-wise ripple-carry adder/subtractor of the slice periphery, 3-stage pipeline.
//
// A WORD-bit word occupies WORD adjacent slices, LSB in slice 0. Operand A is read through
// port F and B through port T of the same column, so each slice's periphery already gives,
// in cycle 1, the inverted generate g_n (NAND(A,B) for addition, NAND(NOT A,B) for
// subtraction), the propagate p (A+B, resp. NOT A + B) and the half sum A xor B.
//   cycle 1: these three are latched (the stage-1 latches).
//   cycle 2: the carry (borrow) ripples from LSB to MSB through two NAND gates per slice,
//            c[j+1] = NAND(g_n[j], NAND(p[j], c[j])), c[0] = 0, and is latched. LT/GT are
//            decided here: LT is the final borrow of A - B, GT is no borrow and A != B.
//   cycle 3: sum[j] = s_int[j] xor c[j].
// One new word operation may enter every cycle. Results appear combinationally during their
// last cycle (cmp_* in cycle 2, sum_* in cycle 3) so the caller can write them back at the end
// of that cycle.
// INC is A minus the all-ones word and DEC is A plus the all-ones word: the all-ones word is
// what RBLT reads with no T row selected. Both saturate: when the final carry/borrow shows the
// field wrapped around, A is returned unchanged (A = NOT s_int since B is all ones). The
// pipeline, the NAND carry chain and the cycle counts follow the design; the choice of p as the
// propagate term, the INC/DEC trick, the saturation and the LT/GT logic are this design's own.
// Reset: the valid bits are cleared by the synchronous active-low reset.
module drc2_rca
  import drc2_pkg::*;
#(
  parameter int unsigned WORD = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  arith_e          in_kind,
  input  logic [WORD-1:0] g_n,
  input  logic [WORD-1:0] p,
  input  logic [WORD-1:0] s_int,
  output logic            busy1,
  output logic            cmp_valid,
  output logic            cmp_out,
  output logic            sum_valid,
  output logic [WORD-1:0] sum_out
);
  // Stage-1 latches
  logic            v1;
  arith_e          k1;
  logic [WORD-1:0] g_n1, p1, s1;
  // Stage-2 latches
  logic            v2;
  arith_e          k2;
  logic [WORD-1:0] s2;
  logic [WORD:0]   c2;

  logic [WORD:0]   c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1 && !(k1 inside {AK_GT, AK_LT});
    end
    k1   <= in_kind;
    g_n1 <= g_n;
    p1   <= p;
    s1   <= s_int;
    k2   <= k1;
    s2   <= s1;
    c2   <= c;
  end

  // Cycle 2: NAND-NAND carry ripple, LSB to MSB.
  assign c[0] = 1'b0;
  for (genvar j = 0; j < WORD; j++) begin : g_carry
    assign c[j+1] = ~(g_n1[j] & ~(p1[j] & c[j]));
  end

  assign busy1     = v1;
  assign cmp_valid = v1 && (k1 inside {AK_GT, AK_LT});
  assign cmp_out   = (k1 == AK_LT) ? c[WORD] : (!c[WORD] && (s1 != '0));

  // Cycle 3: final sum, with saturation of INC/DEC.
  logic wrapped;
  assign wrapped   = (k2 inside {AK_INC, AK_DEC}) && !c2[WORD];
  assign sum_valid = v2;
  assign sum_out   = wrapped ? ~s2 : (s2 ^ c2[WORD-1:0]);
endmodule
