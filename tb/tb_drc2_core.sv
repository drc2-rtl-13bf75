// tb_drc2_core: random command stream through the DRC2 macro against a reference model.
//
// The testbench keeps a shadow copy of the array and issues one random command per cycle, of
// three kinds: the same rows on both read ports (reads, NOR/OR/AND/NAND, XOR as comparison,
// NXOR), disjoint row sets on the two ports (mixed operation IMP, reads) and one row per port
// (word operations ADD/SUB/GT/LT/SHL/SHR and two-operand logic) or one row on port F only
// (INC/DEC). Every slice or word picks its own operation, so single-, 2- and 3-cycle operations
// overlap in the pipeline. For each command the expected result of every slice is worked out
// from the shadow copy with integer arithmetic and plain Boolean definitions, and is checked on
// the output bus exactly latency cycles after issue; results with write-back update the shadow
// copy when the core writes them. Plain writes are made in cycles without write-back. The
// generator never lets two results meet on one slice or two write-backs meet in one cycle; a
// final directed sequence makes two write-backs meet and checks wb_conflict and the winner.
// Each operation must have been checked at least once.
module tb_drc2_core;
  import drc2_pkg::*;
  localparam int unsigned ROWS = 16, COLS = 14, WORD = 7, NW = COLS / WORD;
  localparam int unsigned MAX = (1 << WORD) - 1;
  localparam int unsigned H = 8;   // reservation horizon, cycles

  logic clk = 1'b0, rst_n;
  logic cmd_valid, cmd_wb_en, wr_en, wr_ready, busy1, wb_conflict;
  logic [ROWS-1:0] cmd_rwlf, cmd_rwlt;
  op_e cmd_op [COLS];
  logic [3:0] cmd_wb_row, wr_row;
  logic [COLS-1:0] wr_data, wr_mask, out_data, out_valid;

  drc2_core #(.ROWS(ROWS), .COLS(COLS), .WORD(WORD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int op_seen [20];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [COLS-1:0] shadow [ROWS];
  // expectations by absolute cycle mod H
  logic [COLS-1:0] e_valid [H];
  logic [COLS-1:0] e_data  [H];
  logic [COLS-1:0] w_mask  [H];   // write-back landing at the edge ending that cycle
  logic [COLS-1:0] w_data  [H];
  int              w_row   [H];
  logic            w_any   [H];
  op_e             e_op    [H][COLS];

  function automatic logic [ROWS-1:0] rand_set(int lo, int hi);
    logic [ROWS-1:0] v = '0;
    int n = $urandom_range(lo, hi);
    while ($countones(v) < n) v[$urandom_range(0, ROWS-1)] = 1'b1;
    return v;
  endfunction

  function automatic int row_of(logic [ROWS-1:0] v);
    for (int r = 0; r < ROWS; r++) if (v[r]) return r;
    return -1;
  endfunction

  function automatic logic [WORD-1:0] word_of(int row, int w);
    return shadow[row][w*WORD +: WORD];
  endfunction

  // slots of the reservation table for a cycle t
  function automatic int slot(int t); return t % H; endfunction

  int t;
  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_rwlf = '0; cmd_rwlt = '0; cmd_wb_en = 1'b0; cmd_wb_row = '0;
    wr_en = 1'b0; wr_row = '0; wr_data = '0; wr_mask = '0;
    for (int c = 0; c < COLS; c++) cmd_op[c] = OP_NOP;
    for (int i = 0; i < H; i++) begin e_valid[i] = '0; w_any[i] = 1'b0; w_mask[i] = '0; end
    for (int i = 0; i < 20; i++) op_seen[i] = 0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    // fill the array with plain writes
    for (int r = 0; r < ROWS; r++) begin
      wr_en = 1'b1; wr_row = 4'(r); wr_data = COLS'($urandom); wr_mask = '1;
      shadow[r] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (t = 0; t < 4000; t++) begin
      // ---- check the bus for this cycle and apply the write that happened at the last edge
      begin
        automatic int s = slot(t), sp = slot(t + H - 1);
        checks++;
        if (out_valid !== e_valid[s] || ((out_data ^ e_data[s]) & e_valid[s]) != '0) begin
          failures++;
          $display("FAIL t=%0d out_valid=%b exp %b out_data=%b exp %b", t, out_valid, e_valid[s], out_data, e_data[s]);
          for (int c = 0; c < COLS; c++) if (e_valid[s][c]) $display("   slice %0d op %s", c, e_op[s][c].name());
        end else
          for (int c = 0; c < COLS; c++) if (e_valid[s][c]) op_seen[e_op[s][c]]++;
        if (w_any[sp]) shadow[w_row[sp]] = (shadow[w_row[sp]] & ~w_mask[sp]) | (w_data[sp] & w_mask[sp]);
        e_valid[sp] = '0;
        w_any[sp] = 1'b0;
        w_mask[sp] = '0;
      end
      // ---- new command
      begin
        automatic int kind = $urandom_range(0, 2);
        automatic logic [ROWS-1:0] f, tt;
        automatic logic [COLS-1:0] res [4];      // result by latency
        automatic logic [COLS-1:0] msk [4];
        automatic logic want_wb = ($urandom_range(0, 2) == 0);
        automatic int wb_row = $urandom_range(0, ROWS-1);
        automatic logic [COLS-1:0] fval, tand;
        automatic logic exp_ready;
        for (int l = 0; l < 4; l++) begin res[l] = '0; msk[l] = '0; end
        case (kind)
          0: begin f = rand_set(1, 4); tt = f; end
          1: begin f = rand_set(1, 3); tt = rand_set(1, 3) & ~f; if (tt == '0) tt = ~f & (f << 1 | 16'h1); end
          default: begin
            f = rand_set(1, 1);
            tt = ($urandom_range(0, 3) == 0) ? '0 : rand_set(1, 1);
          end
        endcase
        fval = '0; tand = '1;
        for (int r = 0; r < ROWS; r++) begin
          if (f[r])  fval |= shadow[r];
          if (tt[r]) tand &= shadow[r];
        end
        cmd_rwlf = f; cmd_rwlt = tt;
        for (int w = 0; w < NW; w++) begin
          automatic int L = w * WORD;
          automatic op_e wop = OP_NOP;
          if (kind == 2 && $urandom_range(0, 2) != 0) begin
            if (tt == '0) wop = ($urandom_range(0, 1) != 0) ? OP_INC : OP_DEC;
            else begin
              case ($urandom_range(0, 5))
                0: wop = OP_ADD; 1: wop = OP_SUB; 2: wop = OP_GT;
                3: wop = OP_LT;  4: wop = OP_SHL; default: wop = OP_SHR;
              endcase
            end
          end
          if (wop != OP_NOP) begin
            automatic int lat = op_latency(wop);
            automatic int unsigned a = word_of(row_of(f), w);
            automatic int unsigned b = (tt == '0) ? MAX : word_of(row_of(tt), w);
            automatic int unsigned r = 0;
            // the word's slices must be free on the bus at completion
            if ((e_valid[slot(t + lat)][L +: WORD]) != '0) wop = OP_NOP;
            else begin
              case (wop)
                OP_ADD: r = (a + b) & MAX;
                OP_SUB: r = (a - b) & MAX;
                OP_INC: r = (a == MAX) ? a : a + 1;
                OP_DEC: r = (a == 0) ? 0 : a - 1;
                OP_GT:  r = (a > b) ? 1 : 0;
                OP_LT:  r = (a < b) ? 1 : 0;
                OP_SHL: r = (b << 1) & MAX;
                default: r = b >> 1;
              endcase
              res[lat][L +: WORD] = WORD'(r);
              msk[lat][L +: WORD] = '1;
              for (int k = 0; k < WORD; k++) cmd_op[L+k] = wop;
            end
          end
          if (wop == OP_NOP) begin
            // per-slice single-cycle operations
            for (int k = 0; k < WORD; k++) begin
              automatic int c = L + k;
              automatic op_e o;
              automatic logic v;
              case (kind)
                0: begin
                  automatic op_e pool [11] = '{OP_NOP, OP_RD_0, OP_RD_1, OP_NOR, OP_OR, OP_AND,
                                               OP_NAND, OP_XOR, OP_NXOR, OP_RD, OP_RD_NOT};
                  o = pool[$urandom_range(0, 10)];
                  if ($countones(f) > 1 && o inside {OP_RD, OP_RD_NOT}) o = OP_NOP;
                end
                1: begin
                  automatic op_e pool [7] = '{OP_NOP, OP_IMP, OP_NOR, OP_OR, OP_AND, OP_NAND, OP_IMP};
                  o = pool[$urandom_range(0, 6)];
                end
                default: begin
                  // one row per port: XOR is available, NXOR needs the rows on both ports
                  automatic op_e pool [8] = '{OP_NOP, OP_XOR, OP_NAND, OP_IMP, OP_RD, OP_RD_NOT, OP_OR, OP_AND};
                  o = pool[$urandom_range(0, 7)];
                  if (tt == '0 && o == OP_XOR) o = OP_NOP;
                end
              endcase
              if (o != OP_NOP && e_valid[slot(t + 1)][c]) o = OP_NOP;
              // plain Boolean meaning of each operation
              case (o)
                OP_RD:     v = tand[c];
                OP_RD_NOT: v = !fval[c];
                OP_RD_0:   v = 1'b0;
                OP_RD_1:   v = 1'b1;
                OP_NOR:    v = !fval[c];
                OP_OR:     v = fval[c];
                OP_AND:    v = tand[c];
                OP_NAND:   v = !tand[c];
                OP_XOR:    v = fval[c] && !tand[c];   // rows not all equal (f == tt)
                OP_NXOR:   v = !(fval[c] && !tand[c]);
                OP_IMP:    v = fval[c] || !tand[c];
                default:   v = 1'b0;
              endcase
              if (kind == 2 && o == OP_XOR)  v = fval[c] ^ tand[c];
              cmd_op[c] = o;
              if (o != OP_NOP) begin res[1][c] = v; msk[1][c] = 1'b1; end
            end
          end
        end
        // write-back only if every completion cycle has a free write port
        for (int l = 1; l < 4; l++)
          if (msk[l] != '0 && w_any[slot(t + l - 1)]) want_wb = 1'b0;
        cmd_valid = 1'b1;
        cmd_wb_en = want_wb;
        cmd_wb_row = 4'(wb_row);
        for (int l = 1; l < 4; l++) if (msk[l] != '0) begin
          automatic int s = slot(t + l);
          e_valid[s] |= msk[l];
          e_data[s] = (e_data[s] & ~msk[l]) | res[l];
          for (int c = 0; c < COLS; c++) if (msk[l][c]) e_op[s][c] = cmd_op[c];
          if (want_wb) begin
            automatic int ws = slot(t + l - 1);
            w_any[ws] = 1'b1; w_row[ws] = wb_row; w_mask[ws] = msk[l]; w_data[ws] = res[l];
          end
        end
        // plain write when the write port is free this cycle
        exp_ready = !w_any[slot(t)];
        wr_en = !w_any[slot(t)] && ($urandom_range(0, 3) == 0);
        wr_row = 4'($urandom); wr_data = COLS'($urandom); wr_mask = COLS'($urandom);
        if (wr_en) begin
          automatic int ws = slot(t);
          w_any[ws] = 1'b1; w_row[ws] = int'(wr_row); w_mask[ws] = wr_mask; w_data[ws] = wr_data;
        end
        #1;
        checks++;
        if (wr_ready !== exp_ready) begin failures++; $display("FAIL t=%0d wr_ready=%b", t, wr_ready); end
        checks++;
        if (wb_conflict !== 1'b0) begin failures++; $display("FAIL t=%0d unexpected wb_conflict", t); end
      end
      @(negedge clk);
    end
    // ---- directed: two write-backs meet
    begin
      cmd_valid = 1'b0; wr_en = 1'b0;
      repeat (4) @(negedge clk);
      // ADD of rows 0 and 1 into row 2, then OR of row 3 into row 4 two cycles later
      cmd_valid = 1'b1; cmd_rwlf = 16'h1; cmd_rwlt = 16'h2; cmd_wb_en = 1'b1; cmd_wb_row = 4'd2;
      for (int c = 0; c < COLS; c++) cmd_op[c] = OP_ADD;
      @(negedge clk);
      cmd_valid = 1'b0;
      @(negedge clk);
      cmd_valid = 1'b1; cmd_rwlf = 16'h8; cmd_rwlt = '0; cmd_wb_en = 1'b1; cmd_wb_row = 4'd4;
      for (int c = 0; c < COLS; c++) cmd_op[c] = OP_OR;
      #1;
      checks++;
      if (wb_conflict !== 1'b1 || wr_ready !== 1'b0) begin failures++; $display("FAIL conflict not flagged"); end
      begin
        automatic logic [COLS-1:0] sum;
        for (int w = 0; w < NW; w++) sum[w*WORD +: WORD] = WORD'(word_of(0, w) + word_of(1, w));
        shadow[2] = sum;
      end
      @(negedge clk);
      cmd_valid = 1'b0;
      // read rows 2 and 4 back
      cmd_valid = 1'b1; cmd_rwlf = '0; cmd_rwlt = 16'h4; cmd_wb_en = 1'b0;
      for (int c = 0; c < COLS; c++) cmd_op[c] = OP_RD;
      @(negedge clk);
      cmd_rwlt = 16'h10;
      checks++;
      if (out_data !== shadow[2]) begin failures++; $display("FAIL longer write-back lost: %b vs %b", out_data, shadow[2]); end
      @(negedge clk);
      cmd_valid = 1'b0;
      checks++;
      if (out_data !== shadow[4]) begin failures++; $display("FAIL shorter write-back was not dropped"); end
    end
    for (int o = 1; o < 20; o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("FAIL operation %s never checked", op_e'(o)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
