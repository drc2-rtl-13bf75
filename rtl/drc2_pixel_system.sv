// drc2_pixel_system: a DRC2 in-memory computing macro coupled with a BCAM, as a pixel processor.
//
// The image (an occupancy grid of signed pixels) is stored one pixel per row: the sign bit in
// a one-bit-wide BCAM, the remaining COLS bits in the DRC2 bitcell array. A saturating
// increment/decrement pass (sat_start) moves every pixel one step toward zero without taking
// any pixel out of the memory: the memory controller searches the BCAM for negative pixels,
// the hit latches and the priority encoder hand out one row per cycle, and the array's own
// periphery increments that row and writes it back, one pipelined 3-cycle INC per pixel; then
// the same for positive pixels with DEC. The whole image takes Np+8 cycles.
// Beside this, the DRC2 macro stays a general computing memory: a slice-wise program controller
// (prog_*) or the host (host_cmd_*) can issue any command - multi-row logic, word arithmetic,
// shifts, reads - with each slice running its own operation.
//
// Interface:
//   pix_wr_*      write one pixel (sign bit to the BCAM, low bits to the array); taken when
//                 pix_wr_ready is high, which excludes saturating passes and write-back cycles.
//   sat_start     start a saturating pass; sat_busy while it runs, sat_done pulses after it.
//   prog_*        load the program; prog_start/prog_len run its first prog_len commands.
//   host_cmd_*    one command; taken when host_cmd_ready is high.
//   out_data/out_valid  output bus of results, one cycle after they are computed.
//   wb_conflict   two results asked for write-back in one cycle (the shorter was dropped).
// Command sources are served in the order memory controller, program controller, host; this
// priority and the host ports are this design's own. Sizes: COLS = WORD = 7 (8-bit pixels)
// follow the design; ROWS and PROG_DEPTH are this design's choices. Synchronous active-low reset.
module drc2_pixel_system
  import drc2_pkg::*;
#(
  parameter int unsigned ROWS       = 256,
  parameter int unsigned COLS       = 7,
  parameter int unsigned WORD       = 7,
  parameter int unsigned PROG_DEPTH = 16,
  localparam int unsigned AW        = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PAW       = (PROG_DEPTH > 1) ? $clog2(PROG_DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // pixel write
  input  logic            pix_wr_en,
  input  logic [AW-1:0]   pix_wr_row,
  input  logic [COLS:0]   pix_wr_data,
  output logic            pix_wr_ready,
  // saturating increment/decrement
  input  logic            sat_start,
  output logic            sat_busy,
  output logic            sat_done,
  // program controller
  input  logic            prog_we,
  input  logic [PAW-1:0]  prog_addr,
  input  logic [ROWS-1:0] prog_rwlf,
  input  logic [ROWS-1:0] prog_rwlt,
  input  op_e             prog_op [COLS],
  input  logic            prog_wb_en,
  input  logic [AW-1:0]   prog_wb_row,
  input  logic            prog_start,
  input  logic [PAW:0]    prog_len,
  output logic            prog_busy,
  // host command
  input  logic            host_cmd_valid,
  input  logic [ROWS-1:0] host_cmd_rwlf,
  input  logic [ROWS-1:0] host_cmd_rwlt,
  input  op_e             host_cmd_op [COLS],
  input  logic            host_cmd_wb_en,
  input  logic [AW-1:0]   host_cmd_wb_row,
  output logic            host_cmd_ready,
  // results
  output logic [COLS-1:0] out_data,
  output logic [COLS-1:0] out_valid,
  output logic            wb_conflict
);
  // ------------------------------------------------------------ sign-bit search path
  logic [ROWS-1:0] match, hits;
  logic            search_en, search_key, pe_valid, clr_en;
  logic [AW-1:0]   pe_idx, clr_idx;
  logic            core_wr_ready, pix_take;

  assign pix_take     = pix_wr_en && pix_wr_ready;
  assign pix_wr_ready = core_wr_ready && !sat_busy;

  drc2_bcam #(.ROWS(ROWS), .WIDTH(1)) u_bcam (
    .clk     (clk),
    .wr_en   (pix_take),
    .wr_row  (pix_wr_row),
    .wr_data (pix_wr_data[COLS]),
    .key     (search_key),
    .match   (match)
  );

  drc2_hit_detect #(.ROWS(ROWS)) u_hit (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (search_en),
    .match   (match),
    .clr_en  (clr_en),
    .clr_idx (clr_idx),
    .hits    (hits)
  );

  drc2_prio_enc #(.ROWS(ROWS)) u_pe (
    .req   (hits),
    .valid (pe_valid),
    .idx   (pe_idx)
  );

  // ------------------------------------------------------------ memory controller
  logic          mc_valid, core_busy1;
  logic [AW-1:0] mc_row;
  op_e           mc_op;

  drc2_mem_ctrl #(.ROWS(ROWS)) u_mc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (sat_start),
    .busy       (sat_busy),
    .done       (sat_done),
    .search_en  (search_en),
    .search_key (search_key),
    .pe_valid   (pe_valid),
    .pe_idx     (pe_idx),
    .clr_en     (clr_en),
    .clr_idx    (clr_idx),
    .cmd_valid  (mc_valid),
    .cmd_row    (mc_row),
    .cmd_op     (mc_op),
    .core_busy1 (core_busy1)
  );

  logic [ROWS-1:0] mc_rwl;
  drc2_row_dec #(.ROWS(ROWS)) u_rdec (
    .en   (mc_valid),
    .addr (mc_row),
    .wl   (mc_rwl)
  );

  // ------------------------------------------------------------ program controller
  logic            pc_valid, pc_ready, pc_wb_en;
  logic [ROWS-1:0] pc_rwlf, pc_rwlt;
  op_e             pc_op [COLS];
  logic [AW-1:0]   pc_wb_row;

  assign pc_ready = !mc_valid;

  drc2_controller #(.ROWS(ROWS), .COLS(COLS), .PROG_DEPTH(PROG_DEPTH)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .prog_we     (prog_we),
    .prog_addr   (prog_addr),
    .prog_rwlf   (prog_rwlf),
    .prog_rwlt   (prog_rwlt),
    .prog_op     (prog_op),
    .prog_wb_en  (prog_wb_en),
    .prog_wb_row (prog_wb_row),
    .start       (prog_start),
    .len         (prog_len),
    .busy        (prog_busy),
    .cmd_valid   (pc_valid),
    .cmd_ready   (pc_ready),
    .cmd_rwlf    (pc_rwlf),
    .cmd_rwlt    (pc_rwlt),
    .cmd_op      (pc_op),
    .cmd_wb_en   (pc_wb_en),
    .cmd_wb_row  (pc_wb_row)
  );

  assign host_cmd_ready = !mc_valid && !pc_valid;

  // ------------------------------------------------------------ command select
  logic            cmd_valid, cmd_wb_en;
  logic [ROWS-1:0] cmd_rwlf, cmd_rwlt;
  op_e             cmd_op [COLS];
  logic [AW-1:0]   cmd_wb_row;

  always_comb begin
    if (mc_valid) begin
      // INC/DEC of one row: operand on port F, no row on port T (reads all ones).
      cmd_valid  = 1'b1;
      cmd_rwlf   = mc_rwl;
      cmd_rwlt   = '0;
      for (int c = 0; c < COLS; c++) cmd_op[c] = mc_op;
      cmd_wb_en  = 1'b1;
      cmd_wb_row = mc_row;
    end else if (pc_valid) begin
      cmd_valid  = 1'b1;
      cmd_rwlf   = pc_rwlf;
      cmd_rwlt   = pc_rwlt;
      cmd_op     = pc_op;
      cmd_wb_en  = pc_wb_en;
      cmd_wb_row = pc_wb_row;
    end else begin
      cmd_valid  = host_cmd_valid;
      cmd_rwlf   = host_cmd_rwlf;
      cmd_rwlt   = host_cmd_rwlt;
      cmd_op     = host_cmd_op;
      cmd_wb_en  = host_cmd_wb_en;
      cmd_wb_row = host_cmd_wb_row;
    end
  end

  // ------------------------------------------------------------ DRC2 macro
  drc2_core #(.ROWS(ROWS), .COLS(COLS), .WORD(WORD)) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .cmd_valid   (cmd_valid),
    .cmd_rwlf    (cmd_rwlf),
    .cmd_rwlt    (cmd_rwlt),
    .cmd_op      (cmd_op),
    .cmd_wb_en   (cmd_wb_en),
    .cmd_wb_row  (cmd_wb_row),
    .wr_en       (pix_take),
    .wr_row      (pix_wr_row),
    .wr_data     (pix_wr_data[COLS-1:0]),
    .wr_mask     ({COLS{1'b1}}),
    .wr_ready    (core_wr_ready),
    .out_data    (out_data),
    .out_valid   (out_valid),
    .busy1       (core_busy1),
    .wb_conflict (wb_conflict)
  );
endmodule
