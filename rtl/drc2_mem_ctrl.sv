// drc2_mem_ctrl: memory controller of the DRC2 pixel system (saturating increment/decrement).
//
// Every pixel is a signed word: its sign bit sits in the BCAM, its other bits in one row of
// the DRC2 array. To pull every pixel one step toward zero, the controller
//   1. searches the BCAM for sign '1' (one cycle, SEARCH) and latches the hits;
//   2. encodes one hit per cycle (ENCODE), discharges that hit line and, in the next cycle,
//      issues a saturating INC of that row with write-back to the same row; as INC takes 3
//      pipelined cycles, one INC starts every cycle;
//   3. when no hit is left, waits until the last INC is in its final cycle (DRAIN);
//   4. repeats 1-3 with sign '0' and DEC, then returns to IDLE with a one-cycle done pulse.
// With Np1 and Np2 pixels of each sign (both non-zero) busy lasts Np1+4 + Np2+4 = Np+8 cycles,
// the count of the design's pipeline chart; a pass with no hit takes 3 cycles.
// Interface: search_en/search_key drive the BCAM search and the hit latch load; pe_valid/pe_idx
// come from the priority encoder and clr_en/clr_idx discharge the encoded line; cmd_* is the
// command to the core (row address, to be decoded into read word lines, and the operation);
// core_busy1 is the core's "multi-cycle operation still running next cycle".
// The sequence and its cycle count follow the design; the state encoding, the drain rule and
// the no-hit case are this design's own. Synchronous active-low reset returns to IDLE.
module drc2_mem_ctrl
  import drc2_pkg::*;
#(
  parameter int unsigned ROWS = 256,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // BCAM search and hit handling
  output logic          search_en,
  output logic          search_key,
  input  logic          pe_valid,
  input  logic [AW-1:0] pe_idx,
  output logic          clr_en,
  output logic [AW-1:0] clr_idx,
  // command to the core
  output logic          cmd_valid,
  output logic [AW-1:0] cmd_row,
  output op_e           cmd_op,
  input  logic          core_busy1
);
  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_ENCODE, S_DRAIN} state_e;

  state_e        state;
  logic          pass;      // 0: sign '1', INC; 1: sign '0', DEC
  logic          iss_q;
  logic [AW-1:0] row_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pass  <= 1'b0;
      iss_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done  <= 1'b0;
      iss_q <= (state == S_ENCODE) && pe_valid;
      case (state)
        S_IDLE:   if (start) begin
                    state <= S_SEARCH;
                    pass  <= 1'b0;
                  end
        S_SEARCH: state <= S_ENCODE;
        S_ENCODE: if (!pe_valid) state <= S_DRAIN;
        S_DRAIN:  if (!iss_q && !core_busy1) begin
                    if (!pass) begin
                      pass  <= 1'b1;
                      state <= S_SEARCH;
                    end else begin
                      state <= S_IDLE;
                      done  <= 1'b1;
                    end
                  end
        default:  state <= S_IDLE;
      endcase
    end
    if (state == S_ENCODE && pe_valid) row_q <= pe_idx;
  end

  assign busy       = (state != S_IDLE);
  assign search_en  = (state == S_SEARCH);
  assign search_key = !pass;
  assign clr_en     = (state == S_ENCODE) && pe_valid;
  assign clr_idx    = pe_idx;
  assign cmd_valid  = iss_q;
  assign cmd_row    = row_q;
  assign cmd_op     = pass ? OP_DEC : OP_INC;
endmodule
