// drc2_bcam: binary content-addressable memory holding one small field per array row.
//
// In the pixel system each of the ROWS entries holds the sign bit (MSB) of the pixel stored in
// the same row of the DRC2 array. A search compares every entry with the key in one cycle and
// raises the match line of each entry that is equal, so all pixels of one sign are found at
// once whatever the image size. Entries are written one per cycle on the rising clock edge;
// the match lines are combinational from the stored entries and the key (the search cycle).
// A BCAM is taken as a known circuit by the design; this register-and-compare model is the
// simplest equivalent. Entries are not reset.
module drc2_bcam #(
  parameter int unsigned ROWS  = 256,
  parameter int unsigned WIDTH = 1,
  localparam int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_row,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [WIDTH-1:0] key,
  output logic [ROWS-1:0]  match
);
  logic [WIDTH-1:0] entry [ROWS];

  always_ff @(posedge clk)
    if (wr_en) entry[wr_row] <= wr_data;

  always_comb
    for (int r = 0; r < ROWS; r++) match[r] = (entry[r] == key);
endmodule
