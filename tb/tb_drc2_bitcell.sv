// tb_drc2_bitcell: self-checking test of one 10T bitcell.
// Writes random bits through the write port and checks both read ports for every word-line
// combination: RPF pulls down only when selected and storing '1', RPT only when selected and
// storing '0'. Also checks that a read in the cycle of a write still sees the old bit.
module tb_drc2_bitcell;
  logic clk = 1'b0;
  logic wwl, wbl, rwlf, rwlt, pd_f, pd_t;
  int   checks = 0, failures = 0;
  logic model;

  drc2_bitcell dut (.clk, .wwl, .wbl, .rwlf, .rwlt, .pd_f, .pd_t);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ports();
    for (int s = 0; s < 4; s++) begin
      rwlf = s[0];
      rwlt = s[1];
      #1;
      checks++;
      if (pd_f !== (rwlf && model) || pd_t !== (rwlt && !model)) begin
        failures++;
        $display("FAIL stored=%0b rwlf=%0b rwlt=%0b pd_f=%0b pd_t=%0b", model, rwlf, rwlt, pd_f, pd_t);
      end
    end
  endtask

  initial begin
    wwl = 1'b1; wbl = 1'b0; rwlf = 1'b0; rwlt = 1'b0;
    @(negedge clk);
    model = 1'b0;
    wwl = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wwl = 1'($urandom_range(0, 1));
      wbl = 1'($urandom_range(0, 1));
      check_ports();               // before the edge: old value
      @(posedge clk);
      if (wwl) model = wbl;
      #1;
      wwl = 1'b0;
      check_ports();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
