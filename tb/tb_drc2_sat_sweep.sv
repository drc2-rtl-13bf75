// tb_drc2_sat_sweep: saturating-pass sweep over image contents on a 32-row pixel system.
//
// The pixel system pulls every signed pixel one step toward zero per pass: one BCAM search per
// sign, then one pipelined 3-cycle INC (negative pixels) or DEC (positive pixels) per hit, one
// issue per cycle. A pass over Np pixels with both signs present takes Np+8 cycles; a sign with
// no pixel costs 3 cycles instead of Np_sign+4. This bench runs images with:
//   - a random sign mix,
//   - every pixel negative, every pixel positive,
//   - a single pixel of one sign among the other sign,
//   - pixels already at -1 and 0 (nothing may change),
// and repeats passes on one image until every pixel has saturated (-1 or 0), checking the cycle
// count of every pass against the sign counts and the image after every pass against a model.
// The pixel write port must refuse writes while a pass runs.
module tb_drc2_sat_sweep;
  import drc2_pkg::*;
  localparam int unsigned ROWS = 32, COLS = 7, PD = 16;
  localparam int unsigned MAX = (1 << COLS) - 1;

  logic clk = 1'b0, rst_n;
  logic pix_wr_en, pix_wr_ready, sat_start, sat_busy, sat_done;
  logic [4:0] pix_wr_row;
  logic [7:0] pix_wr_data;
  logic prog_we, prog_wb_en, prog_start, prog_busy;
  logic [3:0] prog_addr;
  logic [ROWS-1:0] prog_rwlf, prog_rwlt;
  op_e prog_op [COLS];
  logic [4:0] prog_wb_row;
  logic [4:0] prog_len;
  logic host_cmd_valid, host_cmd_wb_en, host_cmd_ready;
  logic [ROWS-1:0] host_cmd_rwlf, host_cmd_rwlt;
  op_e host_cmd_op [COLS];
  logic [4:0] host_cmd_wb_row;
  logic [COLS-1:0] out_data, out_valid;
  logic wb_conflict;

  drc2_pixel_system #(.ROWS(ROWS), .COLS(COLS), .WORD(COLS), .PROG_DEPTH(PD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pass = 0, n_empty_pass = 0, n_refused = 0;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] pix [ROWS];   // model of the stored image, sign bit included

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic host_idle();
    host_cmd_valid = 1'b0; host_cmd_rwlf = '0; host_cmd_rwlt = '0; host_cmd_wb_en = 1'b0;
    host_cmd_wb_row = '0;
    for (int c = 0; c < COLS; c++) host_cmd_op[c] = OP_NOP;
  endtask

  task automatic load_image();
    for (int r = 0; r < ROWS; r++) begin
      pix_wr_en = 1'b1; pix_wr_row = 5'(r); pix_wr_data = pix[r];
      #1;
      chk("pixel write ready while idle", pix_wr_ready);
      @(negedge clk);
    end
    pix_wr_en = 1'b0;
  endtask

  // one pass: check its length from the sign counts, update the model, read the image back
  task automatic run_pass(string what);
    int neg, pos, cyc, expect_cyc;
    neg = 0; pos = 0;
    foreach (pix[r]) if (pix[r][7]) neg++; else pos++;
    expect_cyc = (neg > 0 ? neg + 4 : 3) + (pos > 0 ? pos + 4 : 3);
    if (neg == 0 || pos == 0) n_empty_pass++;
    sat_start = 1'b1;
    @(negedge clk);
    sat_start = 1'b0;
    cyc = 0;
    while (sat_busy && cyc < 1000) begin
      // a pixel write offered during the pass must be refused
      if (cyc == 2) begin
        pix_wr_en = 1'b1; pix_wr_row = 5'd0; pix_wr_data = 8'h55;
        #1;
        chk($sformatf("%s: pixel write refused during the pass", what), !pix_wr_ready);
        n_refused++;
      end
      @(negedge clk);
      pix_wr_en = 1'b0;
      cyc++;
    end
    chk($sformatf("%s: pass took %0d cycles, expected %0d (%0d negative, %0d positive)",
                  what, cyc, expect_cyc, neg, pos), cyc == expect_cyc);
    chk($sformatf("%s: done pulse", what), sat_done);
    chk($sformatf("%s: no write-back conflict", what), !wb_conflict);
    n_pass++;
    foreach (pix[r]) begin
      if (pix[r][7]) begin
        if (pix[r][COLS-1:0] != COLS'(MAX)) pix[r] = pix[r] + 8'd1;
      end else begin
        if (pix[r][COLS-1:0] != '0) pix[r] = pix[r] - 8'd1;
      end
    end
    // read back, one RD per cycle; a result is on the bus one cycle after its command
    for (int r = 0; r < ROWS; r++) begin
      host_cmd_valid = 1'b1; host_cmd_rwlt = '0; host_cmd_rwlt[r] = 1'b1;
      for (int c = 0; c < COLS; c++) host_cmd_op[c] = OP_RD;
      @(negedge clk);
      chk($sformatf("%s: row %0d got %0d exp %0d", what, r, out_data, pix[r][COLS-1:0]),
          out_valid == '1 && out_data == pix[r][COLS-1:0]);
    end
    host_idle();
    @(negedge clk);
  endtask

  function automatic logic saturated();
    foreach (pix[r]) begin
      if (pix[r][7] && pix[r][COLS-1:0] != COLS'(MAX)) return 1'b0;
      if (!pix[r][7] && pix[r][COLS-1:0] != '0) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    rst_n = 1'b0; pix_wr_en = 1'b0; pix_wr_row = '0; pix_wr_data = '0; sat_start = 1'b0;
    prog_we = 1'b0; prog_addr = '0; prog_rwlf = '0; prog_rwlt = '0; prog_wb_en = 1'b0;
    prog_wb_row = '0; prog_start = 1'b0; prog_len = '0;
    for (int c = 0; c < COLS; c++) prog_op[c] = OP_NOP;
    host_idle();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // random mix
    foreach (pix[r]) pix[r] = 8'($urandom);
    pix[0] = 8'h80; pix[1] = 8'h7F;
    load_image();
    run_pass("random mix");

    // every pixel negative, then every pixel positive
    foreach (pix[r]) pix[r] = {1'b1, 7'($urandom)};
    load_image();
    run_pass("all negative");
    foreach (pix[r]) pix[r] = {1'b0, 7'($urandom)};
    load_image();
    run_pass("all positive");

    // one pixel of each sign alone
    foreach (pix[r]) pix[r] = {1'b0, 7'($urandom_range(1, MAX))};
    pix[ROWS-1] = 8'hC0;
    load_image();
    run_pass("single negative pixel");
    foreach (pix[r]) pix[r] = {1'b1, 7'($urandom_range(0, MAX - 1))};
    pix[5] = 8'h01;
    load_image();
    run_pass("single positive pixel");

    // already saturated: nothing may change
    foreach (pix[r]) pix[r] = (r % 2 != 0) ? 8'hFF : 8'h00;
    load_image();
    run_pass("already saturated");

    // repeat passes on one image until it has converged; small magnitudes keep it short
    foreach (pix[r]) pix[r] = ($urandom % 2 != 0) ? {1'b1, 7'(MAX - $urandom_range(0, 5))}
                                             : {1'b0, 7'($urandom_range(0, 5))};
    load_image();
    for (int i = 0; i < 8 && !saturated(); i++) run_pass($sformatf("convergence pass %0d", i));
    chk("image converged to -1 / 0", saturated());
    run_pass("pass after convergence");

    chk("passes with an empty sign occurred", n_empty_pass >= 2);
    chk("writes were refused during passes", n_refused == n_pass);
    $display("passes %0d, of which %0d with one sign empty", n_pass, n_empty_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
