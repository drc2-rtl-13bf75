// drc2_array: ROWS x COLS array of 10T bitcells with multi-row read access.
//
// Any set of rows can be selected on each of the two read ports in the same cycle. Each
// column's RBLF is pre-charged to '1' and discharged by any F-selected cell storing '1', so
// it evaluates to the NOR of those cells; each RBLT is discharged by any T-selected cell
// storing '0', so it evaluates to their AND. A column with no row selected on a port keeps
// its pre-charged '1'. The pre-charge and discharge happen inside the cycle; here they are the
// combinational OR of the cells' pull-downs.
//
// Interface: wwl is a one-hot row of write word lines, wbl the data and wmask the columns to
// write (a per-column mask is this design's choice, used for partial write-back). The write
// lands on the rising edge, so reads and a write run together in one cycle (2 reads, 1 write)
// and a read of the row being written returns the old content.
module drc2_array #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 7
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wwl,
  input  logic [COLS-1:0] wbl,
  input  logic [COLS-1:0] wmask,
  input  logic [ROWS-1:0] rwlf,
  input  logic [ROWS-1:0] rwlt,
  output logic [COLS-1:0] rblf,
  output logic [COLS-1:0] rblt
);
  logic [COLS-1:0] pd_f [ROWS];
  logic [COLS-1:0] pd_t [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      drc2_bitcell u_cell (
        .clk  (clk),
        .wwl  (wwl[r] & wmask[c]),
        .wbl  (wbl[c]),
        .rwlf (rwlf[r]),
        .rwlt (rwlt[r]),
        .pd_f (pd_f[r][c]),
        .pd_t (pd_t[r][c])
      );
    end
  end

  // Wired discharge of the pre-charged read bit lines.
  always_comb begin
    logic [COLS-1:0] any_f, any_t;
    any_f = '0;
    any_t = '0;
    for (int r = 0; r < ROWS; r++) begin
      any_f |= pd_f[r];
      any_t |= pd_t[r];
    end
    rblf = ~any_f;
    rblt = ~any_t;
  end

endmodule
