// drc2_shifter: word-wise shift by one bit, built from periphery latches, 2 cycles.
//
// In cycle 1 the word read from the array (RBLT of each slice of the word) is latched with
// the direction; in cycle 2 the latched word is presented shifted by one position: left moves
// every bit toward the MSB and fills the LSB with '0', right moves toward the LSB and fills the
// MSB with '0'. The result is combinational during cycle 2 so it can be written back at its end.
// The design only states that a conventional shifter with periphery latches is used and that a
// shift takes 2 cycles; the logical one-bit shift with zero fill is this design's choice.
module drc2_shifter #(
  parameter int unsigned WORD = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_left,
  input  logic [WORD-1:0] in_data,
  output logic            out_valid,
  output logic [WORD-1:0] out_data
);
  logic            v1, left1;
  logic [WORD-1:0] d1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    left1 <= in_left;
    d1    <= in_data;
  end

  assign out_valid = v1;
  assign out_data  = left1 ? {d1[WORD-2:0], 1'b0} : {1'b0, d1[WORD-1:1]};
endmodule
