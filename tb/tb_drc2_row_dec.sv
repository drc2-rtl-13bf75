// tb_drc2_row_dec: exhaustive test of the row decoder at 16 rows and at its default size.
module tb_drc2_row_dec;
  logic en;
  logic [3:0]   a16;
  logic [15:0]  wl16;
  logic [7:0]   a256;
  logic [255:0] wl256;
  int checks = 0, failures = 0;

  drc2_row_dec #(.ROWS(16)) dut16 (.en(en), .addr(a16), .wl(wl16));
  drc2_row_dec dut256 (.en(en), .addr(a256), .wl(wl256));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int r = 0; r < 256; r++) begin
        en = e[0]; a16 = 4'(r); a256 = 8'(r); #1;
        checks++;
        if (wl256 !== (e ? (256'(1) << r) : '0) || wl16 !== (e ? (16'(1) << r[3:0]) : '0)) begin
          failures++;
          $display("FAIL en=%0d r=%0d", e, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
