// tb_drc2_hit_detect: loads random match vectors and discharges random hit lines, comparing the
// pending hits with a shadow register; load wins over a clear in the same cycle.
module tb_drc2_hit_detect;
  localparam int unsigned ROWS = 32;
  logic clk = 1'b0, rst_n;
  logic load, clr_en;
  logic [ROWS-1:0] match, hits, model;
  logic [4:0] clr_idx;
  int checks = 0, failures = 0;

  drc2_hit_detect #(.ROWS(ROWS)) dut (.clk, .rst_n, .load, .match, .clr_en, .clr_idx, .hits);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; clr_en = 1'b0; match = '0; clr_idx = '0;
    @(negedge clk); rst_n = 1'b1; model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (hits !== model) begin
        failures++;
        $display("FAIL hits=%h exp=%h", hits, model);
      end
      load    = ($urandom_range(0, 9) == 0);
      match   = $urandom;
      clr_en  = 1'($urandom_range(0, 1));
      clr_idx = 5'($urandom);
      @(posedge clk);
      if (load) model = match;
      else if (clr_en) model[clr_idx] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
