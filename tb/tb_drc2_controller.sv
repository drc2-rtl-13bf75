// tb_drc2_controller: loads a random program, runs it with a randomly stalling core and checks
// that exactly commands 0 .. len-1 are accepted, in order and unchanged, starting the cycle
// after start, and that busy falls after the last one. Repeated with several lengths.
module tb_drc2_controller;
  import drc2_pkg::*;
  localparam int unsigned ROWS = 16, COLS = 4, DEPTH = 8;
  logic clk = 1'b0, rst_n;
  logic prog_we, prog_wb_en, start, busy, cmd_valid, cmd_ready, cmd_wb_en;
  logic [2:0] prog_addr;
  logic [ROWS-1:0] prog_rwlf, prog_rwlt, cmd_rwlf, cmd_rwlt;
  op_e prog_op [COLS];
  op_e cmd_op [COLS];
  logic [3:0] prog_wb_row, cmd_wb_row;
  logic [3:0] len;
  int checks = 0, failures = 0;

  logic [ROWS-1:0] m_f [DEPTH];
  logic [ROWS-1:0] m_t [DEPTH];
  op_e             m_op [DEPTH][COLS];
  logic            m_we [DEPTH];
  logic [3:0]      m_wr [DEPTH];

  drc2_controller #(.ROWS(ROWS), .COLS(COLS), .PROG_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; prog_we = 1'b0; start = 1'b0; cmd_ready = 1'b0; len = '0;
    prog_addr = '0; prog_rwlf = '0; prog_rwlt = '0; prog_wb_en = 1'b0; prog_wb_row = '0;
    for (int c = 0; c < COLS; c++) prog_op[c] = OP_NOP;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 3'(i);
      prog_rwlf = 16'($urandom); prog_rwlt = 16'($urandom);
      for (int c = 0; c < COLS; c++) prog_op[c] = op_e'($urandom_range(0, 19));
      prog_wb_en = 1'($urandom); prog_wb_row = 4'($urandom);
      m_f[i] = prog_rwlf; m_t[i] = prog_rwlt; m_op[i] = prog_op; m_we[i] = prog_wb_en; m_wr[i] = prog_wb_row;
    end
    @(negedge clk); prog_we = 1'b0;
    for (int run = 0; run < 12; run++) begin
      automatic int n = (run % (DEPTH + 1));
      automatic int got = 0, cyc = 0;
      @(negedge clk);
      start = 1'b1; len = 4'(n);
      @(negedge clk);
      start = 1'b0;
      checks++;
      if (busy !== (n != 0)) begin failures++; $display("FAIL busy after start n=%0d", n); end
      while (busy && cyc < 100) begin
        cmd_ready = 1'($urandom_range(0, 2) != 0);
        #1;
        if (cmd_valid && cmd_ready) begin
          checks++;
          if (got >= n || cmd_rwlf !== m_f[got] || cmd_rwlt !== m_t[got] || cmd_op != m_op[got] ||
              cmd_wb_en !== m_we[got] || cmd_wb_row !== m_wr[got]) begin
            failures++;
            $display("FAIL run %0d command %0d differs", run, got);
          end
          got++;
        end
        @(negedge clk);
        cyc++;
      end
      cmd_ready = 1'b0;
      checks++;
      if (got != n || cmd_valid) begin
        failures++;
        $display("FAIL run %0d: %0d commands accepted, expected %0d", run, got, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
