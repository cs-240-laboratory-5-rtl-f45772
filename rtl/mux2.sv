// mux2: two-input multiplexer of parameterised width.
//
// The HW datapath uses it as the 2x4 MUX in front of the register file's
// write address (Rd or Rt), the 2x16 MUX in front of the ALU's second input
// (Read Data 2 or the sign-extended offset), the write-back MUX (ALU result
// or memory read data) and the next-PC MUX (PC+2 or the branch target).
// sel = 0 passes in0, sel = 1 passes in1, as numbered on the datapath
// drawings. Purely combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
