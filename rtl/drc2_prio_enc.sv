// drc2_prio_enc: priority encoder, address of the lowest-numbered pending hit line.
//
// valid is high when any request line is high; idx is then the lowest index among them
// (0 when none). Purely combinational, so one hit is encoded per cycle. The lowest-index-first
// order is this design's choice; the design only asks for one encoded hit per cycle.
module drc2_prio_enc #(
  parameter int unsigned ROWS = 256,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic [ROWS-1:0] req,
  output logic            valid,
  output logic [AW-1:0]   idx
);
  always_comb begin
    valid = 1'b0;
    idx   = '0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (req[r]) begin
        valid = 1'b1;
        idx   = AW'(r);
      end
  end
endmodule
