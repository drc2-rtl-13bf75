// drc2_controller: slice-wise program controller of the DRC2 macro.
//
// Holds a small program of per-cycle commands. Each command gives the rows selected on read
// port F and on read port T (as bit vectors, so any number of rows), one operation per slice
// and an optional write-back row. After start, commands 0 .. len-1 are issued in order, one per
// cycle in which the core accepts a command (cmd_ready); busy is high until the last one has
// been accepted. The program is written through prog_we/prog_addr/prog_* one command per cycle
// while the controller is idle or running. A start while busy is ignored.
// The design gives the controller's role (choose the selected rows and the operation of each
// slice, cycle after cycle); the program memory, its depth and the start/len interface are this
// design's own. Synchronous active-low reset stops the controller; the program is not cleared.
module drc2_controller
  import drc2_pkg::*;
#(
  parameter int unsigned ROWS       = 256,
  parameter int unsigned COLS       = 7,
  parameter int unsigned PROG_DEPTH = 16,
  localparam int unsigned AW        = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PAW       = (PROG_DEPTH > 1) ? $clog2(PROG_DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // program write
  input  logic            prog_we,
  input  logic [PAW-1:0]  prog_addr,
  input  logic [ROWS-1:0] prog_rwlf,
  input  logic [ROWS-1:0] prog_rwlt,
  input  op_e             prog_op [COLS],
  input  logic            prog_wb_en,
  input  logic [AW-1:0]   prog_wb_row,
  // run
  input  logic            start,
  input  logic [PAW:0]    len,
  output logic            busy,
  // command to the core
  output logic            cmd_valid,
  input  logic            cmd_ready,
  output logic [ROWS-1:0] cmd_rwlf,
  output logic [ROWS-1:0] cmd_rwlt,
  output op_e             cmd_op [COLS],
  output logic            cmd_wb_en,
  output logic [AW-1:0]   cmd_wb_row
);
  logic [ROWS-1:0] mem_rwlf  [PROG_DEPTH];
  logic [ROWS-1:0] mem_rwlt  [PROG_DEPTH];
  op_e             mem_op    [PROG_DEPTH][COLS];
  logic            mem_wb_en [PROG_DEPTH];
  logic [AW-1:0]   mem_wb_row[PROG_DEPTH];

  logic [PAW:0]    pc, last;

  always_ff @(posedge clk)
    if (prog_we) begin
      mem_rwlf[prog_addr]   <= prog_rwlf;
      mem_rwlt[prog_addr]   <= prog_rwlt;
      mem_op[prog_addr]     <= prog_op;
      mem_wb_en[prog_addr]  <= prog_wb_en;
      mem_wb_row[prog_addr] <= prog_wb_row;
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      pc   <= '0;
      last <= '0;
    end else if (!busy) begin
      if (start && len != '0) begin
        busy <= 1'b1;
        pc   <= '0;
        last <= len - 1'b1;
      end
    end else if (cmd_ready) begin
      if (pc == last) busy <= 1'b0;
      pc <= pc + 1'b1;
    end
  end

  logic [PAW-1:0] rd;
  assign rd         = pc[PAW-1:0];
  assign cmd_valid  = busy;
  assign cmd_rwlf   = mem_rwlf[rd];
  assign cmd_rwlt   = mem_rwlt[rd];
  assign cmd_op     = mem_op[rd];
  assign cmd_wb_en  = mem_wb_en[rd];
  assign cmd_wb_row = mem_wb_row[rd];
endmodule
