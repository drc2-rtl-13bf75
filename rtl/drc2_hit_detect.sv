// drc2_hit_detect: latches the BCAM match lines of a search and tracks the hits still pending.
//
// On load (the search cycle) the match lines are captured into one hit latch per row. Each
// cycle the priority encoder may pick one pending hit; clr_en/clr_idx then discharge that hit
// line to '0' at the clock edge, so the next encode sees the remaining ones. Load takes
// precedence over a clear in the same cycle. Synchronous active-low reset empties the latches.
// The capture-and-discharge behaviour follows the design; the register form is this design's.
module drc2_hit_detect #(
  parameter int unsigned ROWS = 256,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [ROWS-1:0] match,
  input  logic            clr_en,
  input  logic [AW-1:0]   clr_idx,
  output logic [ROWS-1:0] hits
);
  always_ff @(posedge clk) begin
    if (!rst_n)      hits <= '0;
    else if (load)   hits <= match;
    else if (clr_en) hits[clr_idx] <= 1'b0;
  end
endmodule
