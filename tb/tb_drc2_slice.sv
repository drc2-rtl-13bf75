// tb_drc2_slice: every operation of one slice, for random selected bit sets.
// Three access patterns are generated: the same rows on both ports (reads, NOR/OR/AND/NAND,
// XOR as "not all equal", NXOR as "all equal"), disjoint rows on the two ports (mixed operation
// IMP = OR(F) or NAND(T)), and one row per port (A on F, B on T) for the adder outputs: the
// generate-bar, the propagate and the half sum must form a correct full adder / subtractor bit.
module tb_drc2_slice;
  import drc2_pkg::*;
  op_e  op;
  logic rblf, rblt, logic_out, g_n, p, s_int;
  int   checks = 0, failures = 0;

  drc2_slice dut (.op, .rblf, .rblt, .logic_out, .g_n, .p, .s_int);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s rblf=%b rblt=%b got=%b exp=%b", what, op.name(), rblf, rblt, got, exp);
    end
  endtask

  initial begin
    // same rows on both ports
    for (int i = 0; i < 300; i++) begin
      automatic int n = $urandom_range(1, 6);
      automatic logic [5:0] v = 6'($urandom);
      automatic logic any1 = 1'b0, all1 = 1'b1;
      for (int k = 0; k < n; k++) begin any1 |= v[k]; all1 &= v[k]; end
      rblf = !any1; rblt = all1;
      op = OP_NOR;    #1; chk("nor",  logic_out, !any1);
      op = OP_OR;     #1; chk("or",   logic_out, any1);
      op = OP_AND;    #1; chk("and",  logic_out, all1);
      op = OP_NAND;   #1; chk("nand", logic_out, !all1);
      op = OP_XOR;    #1; chk("comp", logic_out, any1 && !all1);
      op = OP_NXOR;   #1; chk("nxor", logic_out, !(any1 && !all1));
      op = OP_RD_0;   #1; chk("rd0",  logic_out, 1'b0);
      op = OP_RD_1;   #1; chk("rd1",  logic_out, 1'b1);
      op = OP_NOP;    #1; chk("nop",  logic_out, 1'b0);
      if (n == 1) begin
        op = OP_RD;     #1; chk("rd",    logic_out, v[0]);
        op = OP_RD_NOT; #1; chk("rdnot", logic_out, !v[0]);
      end
    end
    // disjoint rows: mixed operation
    for (int i = 0; i < 200; i++) begin
      automatic logic [3:0] f = 4'($urandom), t = 4'($urandom);
      automatic int nf = $urandom_range(1, 4), nt = $urandom_range(1, 4);
      automatic logic orf = 1'b0, andt = 1'b1;
      for (int k = 0; k < nf; k++) orf  |= f[k];
      for (int k = 0; k < nt; k++) andt &= t[k];
      rblf = !orf; rblt = andt;
      op = OP_IMP; #1; chk("imp", logic_out, orf || !andt);
    end
    // one row per port: adder bit outputs
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        for (int ci = 0; ci < 2; ci++) begin
          logic c_out;
          rblf = !a[0]; rblt = b[0];
          op = OP_ADD; #1;
          c_out = !(g_n && !(p && ci[0]));
          chk("add carry", c_out, 2'(a) + 2'(b) + 2'(ci) > 1);
          chk("add sum",   s_int ^ ci[0], a[0] ^ b[0] ^ ci[0]);
          op = OP_SUB; #1;
          c_out = !(g_n && !(p && ci[0]));
          chk("sub borrow", c_out, a < b + ci);
          chk("sub diff",   s_int ^ ci[0], a[0] ^ b[0] ^ ci[0]);
          op = OP_IMP; #1;
          chk("imp 2-row", logic_out, a[0] || !b[0]);
          op = OP_XOR; #1;
          chk("xor 2-row", logic_out, a[0] ^ b[0]);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
