// tb_drc2_bcam: writes random entries, then searches every key and compares the match lines
// with a shadow copy; also a 3-bit-wide instance to check multi-bit compare.
module tb_drc2_bcam;
  localparam int unsigned ROWS = 32;
  logic clk = 1'b0;
  logic wr_en;
  logic [4:0] wr_row;
  logic [2:0] wr_data, key;
  logic [ROWS-1:0] match1, match3;
  logic [2:0] shadow [ROWS];
  int checks = 0, failures = 0;

  drc2_bcam #(.ROWS(ROWS), .WIDTH(1)) dut1 (.clk, .wr_en, .wr_row, .wr_data(wr_data[0]), .key(key[0]), .match(match1));
  drc2_bcam #(.ROWS(ROWS), .WIDTH(3)) dut3 (.clk, .wr_en, .wr_row, .wr_data, .key, .match(match3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; key = '0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wr_en = 1'b1; wr_row = 5'(r); wr_data = 3'($urandom); shadow[r] = wr_data;
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wr_en = 1'($urandom_range(0, 1));
      wr_row = 5'($urandom); wr_data = 3'($urandom);
      key = 3'($urandom);
      #1;
      begin
        logic [ROWS-1:0] e1, e3;
        for (int r = 0; r < ROWS; r++) begin
          e1[r] = (shadow[r][0] == key[0]);
          e3[r] = (shadow[r] == key);
        end
        checks++;
        if (match1 !== e1 || match3 !== e3) begin
          failures++;
          $display("FAIL key=%0d match1=%h/%h match3=%h/%h", key, match1, e1, match3, e3);
        end
      end
      @(posedge clk);
      if (wr_en) shadow[wr_row] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
