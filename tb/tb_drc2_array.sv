// tb_drc2_array: self-checking test of the bitcell array's multi-row access.
// A shadow copy of the array is kept in the testbench. Random masked row writes alternate with
// random selections of any number of rows on each read port; each column's RBLF must equal the
// NOR of the F-selected bits and RBLT the AND of the T-selected bits ('1' with no row).
module tb_drc2_array;
  localparam int unsigned ROWS = 16;
  localparam int unsigned COLS = 6;
  logic clk = 1'b0;
  logic [ROWS-1:0] wwl, rwlf, rwlt;
  logic [COLS-1:0] wbl, wmask, rblf, rblt;
  logic [COLS-1:0] shadow [ROWS];
  int checks = 0, failures = 0;

  drc2_array #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .wwl, .wbl, .wmask, .rwlf, .rwlt, .rblf, .rblt);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ROWS-1:0] rand_rows();
    logic [ROWS-1:0] v = '0;
    int n = $urandom_range(0, 5);
    for (int i = 0; i < n; i++) v[$urandom_range(0, ROWS-1)] = 1'b1;
    return v;
  endfunction

  initial begin
    rwlf = '0; rwlt = '0; wmask = '1;
    // fill every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wwl = '0; wwl[r] = 1'b1;
      wbl = COLS'($urandom);
      shadow[r] = wbl;
    end
    @(negedge clk);
    wwl = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rwlf = rand_rows();
      rwlt = rand_rows();
      wwl = '0;
      if ($urandom_range(0, 1)) begin
        automatic int r = $urandom_range(0, ROWS-1);
        wwl[r] = 1'b1;
        wbl    = COLS'($urandom);
        wmask  = COLS'($urandom);
      end
      #1;
      begin
        logic [COLS-1:0] ef, et;
        ef = '1; et = '1;
        for (int r = 0; r < ROWS; r++) begin
          if (rwlf[r]) ef &= ~shadow[r];
          if (rwlt[r]) et &= shadow[r];
        end
        checks++;
        if (rblf !== ef || rblt !== et) begin
          failures++;
          $display("FAIL rwlf=%h rwlt=%h rblf=%b/%b rblt=%b/%b", rwlf, rwlt, rblf, ef, rblt, et);
        end
      end
      @(posedge clk);
      for (int r = 0; r < ROWS; r++)
        if (wwl[r]) shadow[r] = (shadow[r] & ~wmask) | (wbl & wmask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
