// tb_drc2_pixel_system: end-to-end test of the DRC2 pixel system at its default size.
//
// 1. Writes every pixel (signed 8-bit, random, plus rows at -1 and 0 so both saturation cases
//    occur) through the pixel write port.
// 2. Runs one saturating pass and checks it takes exactly Np+8 cycles, that both sign searches
//    happen and that INC/DEC are issued back to back, one per cycle.
// 3. Reads every row back through host commands, pipelined, and compares it with the expected
//    pixel: negative pixels one step up, positive ones one step down, saturating at -1 and 0.
// 4. Loads and runs a program through the slice-wise controller: multi-row dual-port logic with
//    a different operation on every slice, shift, compare, add and subtract with write-back, and
//    mixed two-row logic; every result is checked on the output bus at the cycle its latency
//    gives, and the written-back rows are read back.
// Each mechanism (search, back-to-back INC/DEC, saturation, multi-row access, per-slice mixed
// operations, 1/2/3-cycle operations, write-back, switching between command sources) is counted
// and must occur at least once.
module tb_drc2_pixel_system;
  import drc2_pkg::*;
  localparam int unsigned ROWS = 256, COLS = 7, PD = 16;
  localparam int unsigned MAX = (1 << COLS) - 1;

  logic clk = 1'b0, rst_n;
  logic pix_wr_en, pix_wr_ready, sat_start, sat_busy, sat_done;
  logic [7:0] pix_wr_row;
  logic [7:0] pix_wr_data;
  logic prog_we, prog_wb_en, prog_start, prog_busy;
  logic [3:0] prog_addr;
  logic [ROWS-1:0] prog_rwlf, prog_rwlt;
  op_e prog_op [COLS];
  logic [7:0] prog_wb_row;
  logic [4:0] prog_len;
  logic host_cmd_valid, host_cmd_wb_en, host_cmd_ready;
  logic [ROWS-1:0] host_cmd_rwlf, host_cmd_rwlt;
  op_e host_cmd_op [COLS];
  logic [7:0] host_cmd_wb_row;
  logic [COLS-1:0] out_data, out_valid;
  logic wb_conflict;

  drc2_pixel_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_search = 0, n_b2b = 0, n_sat = 0, n_multirow = 0, n_mixed = 0;
  int n_lat [4];
  int n_wb = 0, n_switch = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] pix [ROWS];
  logic [COLS-1:0] mem [ROWS];

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_idle();
    host_cmd_valid = 1'b0; host_cmd_rwlf = '0; host_cmd_rwlt = '0; host_cmd_wb_en = 1'b0;
    host_cmd_wb_row = '0;
    for (int c = 0; c < COLS; c++) host_cmd_op[c] = OP_NOP;
  endtask

  // read rows lo..hi through host RD commands, one per cycle, compare with mem[]
  task automatic read_back(int lo, int hi, string what);
    for (int r = lo; r <= hi; r++) begin
      host_cmd_valid = 1'b1; host_cmd_rwlt = '0; host_cmd_rwlt[r] = 1'b1;
      for (int c = 0; c < COLS; c++) host_cmd_op[c] = OP_RD;
      @(negedge clk);
      chk($sformatf("%s row %0d: got %0d exp %0d", what, r, out_data, mem[r]),
          out_valid == '1 && out_data == mem[r]);
    end
    host_idle();
  endtask

  // program
  typedef struct {
    logic [ROWS-1:0] f, t;
    op_e             op [COLS];
    logic            wb;
    int              wb_row;
  } pcmd_t;
  pcmd_t prog [$];

  function automatic logic [COLS-1:0] expect_cmd(pcmd_t p);
    logic [COLS-1:0] fval = '0, tand = '1, e;
    int a = -1, b = -1;
    for (int r = 0; r < ROWS; r++) begin
      if (p.f[r]) begin fval |= mem[r]; a = r; end
      if (p.t[r]) begin tand &= mem[r]; b = r; end
    end
    case (p.op[0])
      OP_ADD: return COLS'(mem[a] + mem[b]);
      OP_SUB: return COLS'(mem[a] - mem[b]);
      OP_GT:  return COLS'(mem[a] > mem[b]);
      OP_LT:  return COLS'(mem[a] < mem[b]);
      OP_SHL: return COLS'(mem[b] << 1);
      OP_SHR: return COLS'(mem[b] >> 1);
      default: ;
    endcase
    for (int c = 0; c < COLS; c++)
      case (p.op[c])
        OP_RD:     e[c] = tand[c];
        OP_RD_NOT: e[c] = !fval[c];
        OP_RD_0:   e[c] = 1'b0;
        OP_RD_1:   e[c] = 1'b1;
        OP_NOR:    e[c] = !fval[c];
        OP_OR:     e[c] = fval[c];
        OP_AND:    e[c] = tand[c];
        OP_NAND:   e[c] = !tand[c];
        OP_XOR:    e[c] = (p.f == p.t) ? (fval[c] && !tand[c]) : (fval[c] ^ tand[c]);
        OP_NXOR:   e[c] = !(fval[c] && !tand[c]);
        OP_IMP:    e[c] = fval[c] || !tand[c];
        default:   e[c] = 1'b0;
      endcase
    return e;
  endfunction

  function automatic pcmd_t mk(logic [ROWS-1:0] f, logic [ROWS-1:0] t, op_e o, logic wb, int row);
    pcmd_t p;
    p.f = f; p.t = t; p.wb = wb; p.wb_row = row;
    for (int c = 0; c < COLS; c++) p.op[c] = o;
    return p;
  endfunction

  function automatic logic [ROWS-1:0] rows(int a, int b = -1, int c = -1);
    logic [ROWS-1:0] v = '0;
    v[a] = 1'b1;
    if (b >= 0) v[b] = 1'b1;
    if (c >= 0) v[c] = 1'b1;
    return v;
  endfunction

  int n1, n0, cyc;
  int issue_prev;

  initial begin
    for (int l = 0; l < 4; l++) n_lat[l] = 0;
    rst_n = 1'b0; pix_wr_en = 1'b0; pix_wr_row = '0; pix_wr_data = '0; sat_start = 1'b0;
    prog_we = 1'b0; prog_addr = '0; prog_rwlf = '0; prog_rwlt = '0; prog_wb_en = 1'b0;
    prog_wb_row = '0; prog_start = 1'b0; prog_len = '0;
    for (int c = 0; c < COLS; c++) prog_op[c] = OP_NOP;
    host_idle();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. load the image
    for (int r = 0; r < ROWS; r++) begin
      pix[r] = (r == 0) ? 8'hFF : (r == 1) ? 8'h00 : (r == 2) ? 8'h80 : (r == 3) ? 8'h7F : 8'($urandom);
      pix_wr_en = 1'b1; pix_wr_row = 8'(r); pix_wr_data = pix[r];
      #1;
      chk("pixel write ready", pix_wr_ready);
      @(negedge clk);
    end
    pix_wr_en = 1'b0;
    n1 = 0; n0 = 0;
    for (int r = 0; r < ROWS; r++) begin
      automatic logic [COLS-1:0] low = pix[r][COLS-1:0];
      if (pix[r][7]) begin
        n1++;
        if (low == COLS'(MAX)) n_sat++;
        mem[r] = (low == COLS'(MAX)) ? low : low + 1'b1;
      end else begin
        n0++;
        if (low == '0) n_sat++;
        mem[r] = (low == '0) ? low : low - 1'b1;
      end
    end

    // ---- 2. saturating pass
    sat_start = 1'b1;
    @(negedge clk);
    sat_start = 1'b0;
    cyc = 0; issue_prev = 0;
    while (sat_busy && cyc < 2000) begin
      if (dut.search_en) n_search++;
      if (dut.mc_valid && issue_prev) n_b2b++;
      issue_prev = int'(dut.mc_valid);
      chk("no host command during the pass", !host_cmd_ready || !dut.mc_valid);
      @(negedge clk);
      cyc++;
    end
    chk($sformatf("saturating pass took %0d cycles, expected Np+8 = %0d", cyc, ROWS + 8), cyc == ROWS + 8);
    chk("done pulse", sat_done);
    n_switch++;

    // ---- 3. read the image back
    read_back(0, ROWS - 1, "after pass");
    n_switch++;

    // ---- 4. program
    begin
      automatic op_e mix_dual [COLS] = '{OP_XOR, OP_NXOR, OP_OR, OP_NOR, OP_AND, OP_NAND, OP_IMP};
      automatic op_e mix_two  [COLS] = '{OP_IMP, OP_XOR, OP_RD, OP_RD_NOT, OP_RD_0, OP_RD_1, OP_OR};
      automatic pcmd_t p;
      // latencies 1,2,2,2,3,3,(nop),(nop),1 keep every result on its own bus cycle
      p = mk(rows(10, 11, 12), rows(10, 11, 12), OP_NOP, 1'b0, 0); p.op = mix_dual; prog.push_back(p);
      prog.push_back(mk('0, rows(20), OP_SHL, 1'b1, 40));
      prog.push_back(mk(rows(21), rows(22), OP_GT, 1'b0, 0));
      prog.push_back(mk(rows(21), rows(22), OP_LT, 1'b0, 0));
      prog.push_back(mk(rows(21), rows(22), OP_ADD, 1'b1, 41));
      prog.push_back(mk(rows(21), rows(22), OP_SUB, 1'b1, 42));
      prog.push_back(mk('0, '0, OP_NOP, 1'b0, 0));
      prog.push_back(mk('0, '0, OP_NOP, 1'b0, 0));
      p = mk(rows(23), rows(24), OP_NOP, 1'b0, 0); p.op = mix_two; prog.push_back(p);
      prog.push_back(mk('0, rows(25), OP_SHR, 1'b0, 0));
    end
    foreach (prog[i]) begin
      prog_we = 1'b1; prog_addr = 4'(i); prog_rwlf = prog[i].f; prog_rwlt = prog[i].t;
      prog_op = prog[i].op; prog_wb_en = prog[i].wb; prog_wb_row = 8'(prog[i].wb_row);
      @(negedge clk);
    end
    prog_we = 1'b0;
    begin
      automatic logic [COLS-1:0] exp_d [64];
      automatic logic            exp_v [64];
      for (int k = 0; k < 64; k++) exp_v[k] = 1'b0;
      foreach (prog[i]) begin
        automatic int lat = op_latency(prog[i].op[0]);
        if (prog[i].op[0] == OP_NOP && prog[i].op[1] != OP_NOP) lat = 1;
        if (lat > 0) begin
          exp_v[i + lat] = 1'b1;
          exp_d[i + lat] = expect_cmd(prog[i]);
          n_lat[lat]++;
        end
        if ($countones(prog[i].f) > 1) n_multirow++;
        if (prog[i].op[0] != prog[i].op[1]) n_mixed++;
      end
      // the program's first command is issued in the cycle after prog_start (k = 0); a host
      // command offered from then on must wait until the program is done
      prog_start = 1'b1; prog_len = 5'(prog.size());
      for (int k = 0; k < 20; k++) begin
        @(negedge clk);
        prog_start = 1'b0;
        if (k == 0) begin
          host_cmd_valid = 1'b1; host_cmd_rwlt = rows(30);
          for (int c = 0; c < COLS; c++) host_cmd_op[c] = OP_RD;
        end
        #1;
        if (k < prog.size()) chk($sformatf("host waits while the program runs (%0d)", k), !host_cmd_ready);
        if (k == prog.size()) chk("host command taken after the program", host_cmd_ready);
        if (exp_v[k]) chk($sformatf("program result at cycle %0d: %b exp %b", k, out_data, exp_d[k]),
                          out_valid == '1 && out_data == exp_d[k]);
        else if (k != prog.size() + 1) chk($sformatf("bus idle at cycle %0d", k), out_valid == '0);
        chk("no write-back conflict", !wb_conflict);
        if (k == prog.size()) host_idle();   // taken at once; row 30 is checked below
      end
      n_switch++;
      // expected write-backs
      mem[40] = COLS'(mem[20] << 1);
      mem[41] = COLS'(mem[21] + mem[22]);
      mem[42] = COLS'(mem[21] - mem[22]);
      n_wb += 3;
      host_idle();
      @(negedge clk);
      read_back(40, 42, "write-back");
      read_back(0, 39, "untouched");
    end

    chk("two searches per pass", n_search == 2);
    chk("INC/DEC issued back to back", n_b2b >= ROWS - 3);
    chk("saturation occurred", n_sat >= 2);
    chk("multi-row access", n_multirow > 0);
    chk("different operations on different slices", n_mixed > 0);
    chk("1-cycle operations", n_lat[1] > 0);
    chk("2-cycle operations", n_lat[2] > 0);
    chk("3-cycle operations", n_lat[3] > 0);
    chk("write-back", n_wb > 0);
    chk("command source switches", n_switch >= 3);
    $display("pass: %0d cycles for %0d pixels (%0d negative, %0d positive); searches %0d, back-to-back issues %0d, saturated %0d",
             cyc, ROWS, n1, n0, n_search, n_b2b, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
