// tb_drc2_rca: pipelined word arithmetic, one new operation per cycle.
// Operands A and B are random WORD-bit words (with extra weight on 0 and all-ones so INC/DEC
// saturation occurs). The stage-1 inputs are the slice outputs a memory slice produces for A on
// port F and B on port T (all ones for INC/DEC). Results are compared with integer arithmetic:
// LT/GT exactly one cycle after issue (2-cycle operations), ADD/SUB/INC/DEC exactly two cycles
// after issue (3-cycle operations).
module tb_drc2_rca;
  import drc2_pkg::*;
  localparam int unsigned WORD = 7;
  localparam int unsigned MAX  = (1 << WORD) - 1;
  logic clk = 1'b0, rst_n;
  logic in_valid;
  arith_e in_kind;
  logic [WORD-1:0] g_n, p, s_int, sum_out;
  logic busy1, cmp_valid, cmp_out, sum_valid;
  int checks = 0, failures = 0, n_sat = 0;

  drc2_rca #(.WORD(WORD)) dut (.clk, .rst_n, .in_valid, .in_kind, .g_n, .p, .s_int, .busy1,
                               .cmp_valid, .cmp_out, .sum_valid, .sum_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results by issue cycle
  logic    ev [4];
  arith_e  ek [4];
  int      ex [4];

  function automatic int unsigned pick();
    case ($urandom_range(0, 5))
      0: return 0;
      1: return MAX;
      default: return $urandom_range(0, MAX);
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_kind = AK_ADD; g_n = '0; p = '0; s_int = '0;
    for (int i = 0; i < 4; i++) ev[i] = 1'b0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check results of earlier issues
      begin
        automatic int i1 = (t + 3) % 4, i2 = (t + 2) % 4;
        automatic logic e_cmp = ev[i1] && (ek[i1] inside {AK_GT, AK_LT});
        automatic logic e_sum = ev[i2] && !(ek[i2] inside {AK_GT, AK_LT});
        checks++;
        if (cmp_valid !== e_cmp || (e_cmp && cmp_out !== ex[i1][0])) begin
          failures++;
          $display("FAIL t=%0d cmp_valid=%b exp %b cmp=%b exp %0d", t, cmp_valid, e_cmp, cmp_out, ex[i1]);
        end
        checks++;
        if (sum_valid !== e_sum || (e_sum && sum_out !== WORD'(ex[i2]))) begin
          failures++;
          $display("FAIL t=%0d kind=%s sum_valid=%b exp %b sum=%0d exp %0d", t, ek[i2].name(), sum_valid, e_sum, sum_out, ex[i2]);
        end
        checks++;
        if (busy1 !== ev[i1]) begin
          failures++;
          $display("FAIL t=%0d busy1", t);
        end
      end
      // issue
      begin
        automatic int unsigned a = pick(), b = pick();
        logic [WORD-1:0] A, B;
        automatic int k = t % 7;
        in_valid = (k != 6) || ($urandom_range(0, 1) == 0);
        in_kind  = arith_e'($urandom_range(0, 5));
        if (in_kind inside {AK_INC, AK_DEC}) b = MAX;
        A = WORD'(a); B = WORD'(b);
        if (in_kind inside {AK_ADD, AK_DEC}) begin
          g_n = ~(A & B); p = A | B;
        end else begin
          g_n = ~(~A & B); p = ~A | B;
        end
        s_int = A ^ B;
        ev[t % 4] = in_valid;
        ek[t % 4] = in_kind;
        case (in_kind)
          AK_ADD: ex[t % 4] = int'((a + b) & MAX);
          AK_SUB: ex[t % 4] = int'((a - b) & MAX);
          AK_INC: ex[t % 4] = (a == MAX) ? int'(a) : int'(a + 1);
          AK_DEC: ex[t % 4] = (a == 0) ? 0 : int'(a - 1);
          AK_GT:  ex[t % 4] = int'(a > b);
          default: ex[t % 4] = int'(a < b);
        endcase
        if (in_valid && ((in_kind == AK_INC && a == MAX) || (in_kind == AK_DEC && a == 0))) n_sat++;
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
