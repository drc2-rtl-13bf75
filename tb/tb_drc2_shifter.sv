// tb_drc2_shifter: random words shifted left and right, one per cycle, result checked in the
// cycle after issue (a 2-cycle operation).
module tb_drc2_shifter;
  localparam int unsigned WORD = 7;
  logic clk = 1'b0, rst_n;
  logic in_valid, in_left, out_valid;
  logic [WORD-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic pv, pl;
  logic [WORD-1:0] pd;

  drc2_shifter #(.WORD(WORD)) dut (.clk, .rst_n, .in_valid, .in_left, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_left = 1'b0; in_data = '0; pv = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== pv || (pv && out_data !== (pl ? WORD'(pd << 1) : WORD'(pd >> 1)))) begin
        failures++;
        $display("FAIL t=%0d in=%b left=%b out=%b valid=%b", t, pd, pl, out_data, out_valid);
      end
      in_valid = 1'($urandom_range(0, 3) != 0);
      in_left  = 1'($urandom_range(0, 1));
      in_data  = WORD'($urandom);
      pv = in_valid; pl = in_left; pd = in_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
