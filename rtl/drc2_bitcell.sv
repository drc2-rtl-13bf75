// drc2_bitcell: one 10-transistor, 3-port SRAM bitcell, as a logic model.
//
// The cell is a 6T write port (WP) storing the bit on node BLTI, plus two 2T read ports.
// Read port F (RPF) pulls its pre-charged bit line RBLF low when RWLF is high and the cell
// stores '1'; read port T (RPT) pulls RBLT low when RWLT is high and the cell stores '0'.
// So a single selected cell reads NOT(A) on RBLF and A on RBLT, and several selected cells
// share a wired NOR on RBLF and a wired AND on RBLT (formed by drc2_array).
//
// Interface: wwl/wbl write the bit on the rising clock edge; pd_f/pd_t are the pull-down
// conditions of the two read ports, combinational from the word lines and the stored bit. Read and write are isolated, so a read in the cycle of a write sees
// the old value. The single-ended write bit line stands for the differential WBLT/WBLF pair;
// cells are not reset, as in an SRAM. These two points are this model's choices.
module drc2_bitcell (
  input  logic clk,
  input  logic wwl,
  input  logic wbl,
  input  logic rwlf,
  input  logic rwlt,
  output logic pd_f,
  output logic pd_t
);
  logic blti;

  always_ff @(posedge clk)
    if (wwl) blti <= wbl;

  assign pd_f = rwlf &  blti;   // RPF_PG on and RPF_PD driven by BLTI
  assign pd_t = rwlt & ~blti;   // RPT_PG on and RPT_PD driven by BLFI
endmodule
