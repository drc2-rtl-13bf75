// tb_drc2_prio_enc: random and corner tests of the priority encoder (lowest index first).
module tb_drc2_prio_enc;
  localparam int unsigned ROWS = 64;
  logic [ROWS-1:0] req;
  logic            valid;
  logic [5:0]      idx;
  int checks = 0, failures = 0;

  drc2_prio_enc #(.ROWS(ROWS)) dut (.req, .valid, .idx);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int exp_i = -1;
    #1;
    for (int r = ROWS - 1; r >= 0; r--) if (req[r]) exp_i = r;
    checks++;
    if (valid !== (exp_i >= 0) || (exp_i >= 0 && idx !== 6'(exp_i))) begin
      failures++;
      $display("FAIL req=%h valid=%b idx=%0d exp=%0d", req, valid, idx, exp_i);
    end
  endtask

  initial begin
    req = '0; check_one();
    for (int r = 0; r < ROWS; r++) begin req = '0; req[r] = 1'b1; check_one(); end
    for (int r = 0; r < ROWS; r++) begin req = '1 << r; check_one(); end
    for (int i = 0; i < 500; i++) begin
      req = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
