// sign_extend: copies the sign bit of a narrow field into the upper bits.
//
// The HW machine extends the 4-bit offset of BEQ, LW and SW: to 8 bits for
// the branch adder of the fetch circuit and to 16 bits for the ALU's second
// input. Both widths are parameters. Purely combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
