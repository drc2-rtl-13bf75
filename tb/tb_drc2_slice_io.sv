// tb_drc2_slice_io: self-checking test of the slice periphery against its access-mode table.
// Two-row mode: A on port F (RBLF = NOT A) and B on port T (RBLT = B), all four operand pairs,
// both ADDEN values. Multi-row dual-port mode: random sets of up to 8 bits seen on both ports
// (RBLF = NOR, RBLT = AND), ADDEN=0: O1 = 1, O2 = all equal, O3 = not all equal. Multi-row
// single-port mode: O1 = OR of the F bits or NAND of the T bits (mixed operation).
module tb_drc2_slice_io;
  logic rblf, rblt, adden, o1, o2, o3;
  int   checks = 0, failures = 0;

  drc2_slice_io dut (.rblf, .rblt, .adden, .o1, .o2, .o3);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(string what, logic e1, logic e2, logic e3, logic use2, logic use3);
    checks++;
    if (o1 !== e1 || (use2 && o2 !== e2) || (use3 && o3 !== e3)) begin
      failures++;
      $display("FAIL %s rblf=%b rblt=%b adden=%b o=%b%b%b exp=%b%b%b", what, rblf, rblt, adden,
               o1, o2, o3, e1, e2, e3);
    end
  endtask

  initial begin
    // two rows, one read port each
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        logic A, B;
        A = a[0]; B = b[0];
        rblf = ~A; rblt = B;
        adden = 1'b0; #1;
        // B -> A, A -> B, A xor B (subtraction mode)
        expect3("sub", !B || A, !A || B, A ^ B, 1'b1, 1'b1);
        adden = 1'b1; #1;
        // NOT carry, A + B, NOT(A xor B) (addition mode)
        expect3("add", !(A && B), A || B, !(A ^ B), 1'b1, 1'b1);
      end
    // multi-row dual port
    for (int i = 0; i < 200; i++) begin
      automatic int n = $urandom_range(1, 8);
      automatic logic [7:0] v = 8'($urandom);
      automatic logic all0 = 1'b1, all1 = 1'b1;
      for (int k = 0; k < n; k++) begin
        all0 &= !v[k];
        all1 &= v[k];
      end
      rblf = all0; rblt = all1; adden = 1'b0; #1;
      expect3("dual", 1'b1, all0 || all1, !(all0 || all1), 1'b1, 1'b1);
    end
    // multi-row single port (mixed operation)
    for (int i = 0; i < 200; i++) begin
      automatic int nf = $urandom_range(1, 4), nt = $urandom_range(1, 4);
      automatic logic [3:0] f = 4'($urandom), t = 4'($urandom);
      automatic logic orf = 1'b0, andt = 1'b1;
      for (int k = 0; k < nf; k++) orf  |= f[k];
      for (int k = 0; k < nt; k++) andt &= t[k];
      rblf = !orf; rblt = andt; adden = 1'b0; #1;
      expect3("mix", orf || !andt, 1'b0, 1'b0, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
