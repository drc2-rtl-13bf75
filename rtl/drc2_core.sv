// drc2_core: the DRC2 macro, a bitcell array whose periphery computes instead of just reading.
//
// Each cycle one command may be issued. It selects any set of rows on read port F (cmd_rwlf)
// and on read port T (cmd_rwlt) and gives every slice (column) its own operation (cmd_op).
// The array evaluates the wired NOR on RBLF and the wired AND on RBLT of each column, and each
// slice's periphery turns them into the requested result:
//   - single-cycle operations (reads, NOR/OR/AND/NAND, XOR/COMP, NXOR, IMP) finish in the
//     cycle of the access;
//   - SHL/SHR, GT and LT finish in their 2nd cycle, ADD/SUB/INC/DEC in their 3rd; these work
//     on WORD-bit words (WORD adjacent slices, LSB in the lowest slice), one drc2_rca and one
//     drc2_shifter per word. Every slice of a word must carry the same word operation.
// Because the array has two read ports and a separate write port, a new command can start every
// cycle while earlier multi-cycle operations proceed in the periphery pipeline.
//
// Results: the output bus out_data/out_valid is registered, so a result computed in cycle t is
// on the bus in cycle t+1. If cmd_wb_en was set, the result is also written back into row
// cmd_wb_row at the end of the cycle that computes it (only the slices that produced a result
// are written). If operations of different lengths finish on the same slice in one cycle, the
// longer one wins the bus; one write-back is done per cycle, the longest first, and wb_conflict
// flags a dropped one. Plain writes (wr_*) use the write port in cycles without write-back;
// wr_ready tells whether this cycle's write is taken. busy1 is high while a multi-cycle
// operation is in its 2nd cycle or earlier, i.e. will still be running next cycle.
// The operation set, the access modes, the pipelining and the write-back follow the design;
// the registered bus, the priorities, the conflict flag and the plain-write port are this
// design's own. Synchronous active-low reset clears the valid bits; the array is not reset.
module drc2_core
  import drc2_pkg::*;
#(
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 7,
  parameter int unsigned WORD = 7,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            cmd_valid,
  input  logic [ROWS-1:0] cmd_rwlf,
  input  logic [ROWS-1:0] cmd_rwlt,
  input  op_e             cmd_op [COLS],
  input  logic            cmd_wb_en,
  input  logic [AW-1:0]   cmd_wb_row,
  // plain write
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_row,
  input  logic [COLS-1:0] wr_data,
  input  logic [COLS-1:0] wr_mask,
  output logic            wr_ready,
  // results
  output logic [COLS-1:0] out_data,
  output logic [COLS-1:0] out_valid,
  output logic            busy1,
  output logic            wb_conflict
);
  localparam int unsigned NW = COLS / WORD;

  // ---------------------------------------------------------------- array access
  logic [ROWS-1:0] rwlf, rwlt, wwl;
  logic [COLS-1:0] rblf, rblt, wbl, wmask;
  op_e             op [COLS];

  assign rwlf = cmd_valid ? cmd_rwlf : '0;
  assign rwlt = cmd_valid ? cmd_rwlt : '0;
  always_comb
    for (int c = 0; c < COLS; c++) op[c] = cmd_valid ? cmd_op[c] : OP_NOP;

  drc2_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk   (clk),
    .wwl   (wwl),
    .wbl   (wbl),
    .wmask (wmask),
    .rwlf  (rwlf),
    .rwlt  (rwlt),
    .rblf  (rblf),
    .rblt  (rblt)
  );

  // ---------------------------------------------------------------- slices
  logic [COLS-1:0] logic_out, g_n, p, s_int;
  logic [COLS-1:0] m1, m2, m3;        // slices starting a 1-, 2- or 3-cycle operation

  for (genvar c = 0; c < COLS; c++) begin : g_slice
    drc2_slice u_slice (
      .op        (op[c]),
      .rblf      (rblf[c]),
      .rblt      (rblt[c]),
      .logic_out (logic_out[c]),
      .g_n       (g_n[c]),
      .p         (p[c]),
      .s_int     (s_int[c])
    );
    assign m1[c] = (op_latency(op[c]) == 1);
    assign m2[c] = (op_latency(op[c]) == 2);
    assign m3[c] = (op_latency(op[c]) == 3);
  end

  // ---------------------------------------------------------------- word units
  logic [COLS-1:0] res2, res3;        // results of 2- and 3-cycle operations, per slice
  logic [NW-1:0]   rca_busy1;

  for (genvar w = 0; w < NW; w++) begin : g_word
    localparam int unsigned L = w * WORD;
    logic            cmp_valid, cmp_out, sum_valid, sh_valid;
    logic [WORD-1:0] sum_out, sh_out;

    drc2_rca #(.WORD(WORD)) u_rca (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (is_arith(op[L])),
      .in_kind   (arith_kind(op[L])),
      .g_n       (g_n[L +: WORD]),
      .p         (p[L +: WORD]),
      .s_int     (s_int[L +: WORD]),
      .busy1     (rca_busy1[w]),
      .cmp_valid (cmp_valid),
      .cmp_out   (cmp_out),
      .sum_valid (sum_valid),
      .sum_out   (sum_out)
    );

    drc2_shifter #(.WORD(WORD)) u_shift (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (is_shift(op[L])),
      .in_left   (op[L] == OP_SHL),
      .in_data   (rblt[L +: WORD]),
      .out_valid (sh_valid),
      .out_data  (sh_out)
    );

    assign res2[L +: WORD] = sh_valid  ? sh_out :
                             cmp_valid ? {{(WORD-1){1'b0}}, cmp_out} : '0;
    assign res3[L +: WORD] = sum_valid ? sum_out : '0;

    // A word operation must be given to every slice of the word.
    always_comb
      for (int b = 1; b < WORD; b++)
        if (is_arith(op[L]) || is_shift(op[L]))
          assert (op[L+b] == op[L]) else $error("word %0d: mixed word operation", w);
  end

  // ---------------------------------------------------------------- completion tracking
  logic            wb_en1, wb_en2;
  logic [AW-1:0]   wb_row1, wb_row2;
  logic [COLS-1:0] m2_1, m3_1, m3_2;  // mN_k: N-cycle operation now in its (k+1)-th cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m2_1 <= '0;
      m3_1 <= '0;
      m3_2 <= '0;
    end else begin
      m2_1 <= m2;
      m3_1 <= m3;
      m3_2 <= m3_1;
    end
    wb_en1  <= cmd_valid && cmd_wb_en;
    wb_row1 <= cmd_wb_row;
    wb_en2  <= wb_en1;
    wb_row2 <= wb_row1;
  end

  // Completions of this cycle: m1 (this command), m2_1 (previous one), m3_2 (two back).
  logic [COLS-1:0] done_data, done_mask;
  always_comb
    for (int c = 0; c < COLS; c++) begin
      done_mask[c] = m3_2[c] | m2_1[c] | m1[c];
      done_data[c] = m3_2[c] ? res3[c] : m2_1[c] ? res2[c] : logic_out[c];
    end

  // ---------------------------------------------------------------- write port
  logic            want3, want2, want1, wb_any;
  logic [AW-1:0]   wrow;
  logic            wrow_en;

  assign want3  = wb_en2 && (m3_2 != '0);
  assign want2  = wb_en1 && (m2_1 != '0);
  assign want1  = cmd_valid && cmd_wb_en && (m1 != '0);
  assign wb_any = want3 | want2 | want1;

  always_comb begin
    if (want3) begin
      wrow = wb_row2;  wmask = m3_2;  wbl = res3;
    end else if (want2) begin
      wrow = wb_row1;  wmask = m2_1;  wbl = res2;
    end else if (want1) begin
      wrow = cmd_wb_row; wmask = m1;  wbl = logic_out;
    end else begin
      wrow = wr_row;   wmask = wr_mask; wbl = wr_data;
    end
  end

  assign wr_ready    = !wb_any;
  assign wrow_en     = wb_any || wr_en;
  assign wb_conflict = (int'(want3) + int'(want2) + int'(want1)) > 1;

  drc2_row_dec #(.ROWS(ROWS)) u_wdec (
    .en   (wrow_en),
    .addr (wrow),
    .wl   (wwl)
  );

  // ---------------------------------------------------------------- output bus
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= '0;
    else        out_valid <= done_mask;
    out_data <= done_data & done_mask;
  end

  assign busy1 = (rca_busy1 != '0) || (m2_1 != '0) || (m3_1 != '0);

  initial assert (COLS % WORD == 0) else $fatal(1, "COLS must be a multiple of WORD");
endmodule
