// tb_drc2_mem_ctrl: the saturating-pass sequencer against behavioural stand-ins for the BCAM
// search, the hit latches, the priority encoder and the core's pipeline flag.
// For random sign patterns it checks the search keys ('1' then '0'), that every row of sign
// '1' receives exactly one INC and every row of sign '0' one DEC, in increasing row order, one
// per cycle without gaps, and that busy lasts Np+8 cycles (Np1+4 + Np2+4; 3 for an empty pass).
module tb_drc2_mem_ctrl;
  import drc2_pkg::*;
  localparam int unsigned ROWS = 32;
  logic clk = 1'b0, rst_n;
  logic start, busy, done, search_en, search_key, pe_valid, clr_en, cmd_valid, core_busy1;
  logic [4:0] pe_idx, clr_idx, cmd_row;
  op_e cmd_op;
  logic [ROWS-1:0] sign, hits;
  int checks = 0, failures = 0;

  drc2_mem_ctrl #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural hit latches + lowest-first encoder
  always_comb begin
    pe_valid = 1'b0; pe_idx = '0;
    for (int r = ROWS - 1; r >= 0; r--) if (hits[r]) begin pe_valid = 1'b1; pe_idx = 5'(r); end
  end
  logic issued_q;
  always_ff @(posedge clk) begin
    if (search_en) for (int r = 0; r < ROWS; r++) hits[r] <= (sign[r] == search_key);
    else if (clr_en) hits[clr_idx] <= 1'b0;
    issued_q <= cmd_valid;   // a 3-cycle INC/DEC is in its 2nd cycle one cycle after issue
  end
  assign core_busy1 = issued_q;

  initial begin
    rst_n = 1'b0; start = 1'b0; hits = '0; sign = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int run = 0; run < 8; run++) begin
      automatic int n1 = 0, n0 = 0, cyc = 0, exp_cyc;
      automatic int next1 = 0, next0 = 0, phase = 0;
      automatic int keys[$];
      sign = (run == 0) ? '0 : (run == 1) ? '1 : ROWS'({$urandom});
      for (int r = 0; r < ROWS; r++) if (sign[r]) n1++; else n0++;
      exp_cyc = ((n1 > 0) ? n1 + 4 : 3) + ((n0 > 0) ? n0 + 4 : 3);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (busy && cyc < 200) begin
        if (search_en) keys.push_back(int'(search_key));
        if (cmd_valid) begin
          // expected next row of the current sign
          automatic int want = -1;
          automatic logic want_inc = (keys.size() == 1);
          for (int r = ROWS - 1; r >= (want_inc ? next1 : next0); r--)
            if (sign[r] == want_inc) want = r;
          checks++;
          if (want < 0 || cmd_row !== 5'(want) || cmd_op != (want_inc ? OP_INC : OP_DEC)) begin
            failures++;
            $display("FAIL run %0d: row %0d op %s, expected row %0d", run, cmd_row, cmd_op.name(), want);
          end
          if (want_inc) begin next1 = want + 1; n1--; end
          else begin next0 = want + 1; n0--; end
        end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL run %0d: busy for %0d cycles, expected %0d", run, cyc, exp_cyc);
      end
      checks++;
      if (n1 != 0 || n0 != 0 || keys.size() != 2 || keys[0] != 1 || keys[1] != 0) begin
        failures++;
        $display("FAIL run %0d: rows left %0d/%0d, searches %p", run, n1, n0, keys);
      end
      checks++;
      if (!done) begin failures++; $display("FAIL run %0d: no done pulse", run); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
