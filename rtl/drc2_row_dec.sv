// drc2_row_dec: row decoder, binary row address to one-hot word lines.
//
// Drives exactly one of ROWS word lines high when en is set and the address is in range,
// none otherwise. Purely combinational. The design only names a row decoder beside the
// array; this plain decoder is the simplest one that does the job.
module drc2_row_dec #(
  parameter int unsigned ROWS = 256,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] wl
);
  always_comb begin
    wl = '0;
    for (int r = 0; r < ROWS; r++)
      if (en && addr == AW'(r)) wl[r] = 1'b1;
  end
endmodule
