// instr_fetch: program counter and next-address logic of the HW machine.
//
// The 8-bit PC is cleared to 0 by reset and loaded on every rising clock
// edge. One adder forms PC + 2, the address of the next instruction. For BEQ
// a second adder forms PC + 2 + 2*offset, where the 4-bit offset is
// sign-extended to 8 bits and shifted left by one; a MUX takes the branch
// address when Branch AND Zero is 1, else PC + 2. For JMP the 12-bit offset
// times 2 becomes the next PC; only its low 8 bits fit the 8-bit PC, so
// offset bits 11..7 are dropped (this design's choice). The JMP selection
// sits after the branch MUX, also this design's choice. pc is the fetch
// address; pc_next is the address loaded at the next edge.
module instr_fetch
  import hw_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [3:0]        br_offset,   // instruction bits [3:0]
  input  logic [11:0]       jmp_offset,  // instruction bits [11:0]
  input  logic              branch,
  input  logic              zero,
  input  logic              jump,
  output logic [ADDR_W-1:0] pc,
  output logic [ADDR_W-1:0] pc_next
);
  logic [ADDR_W-1:0] pc_plus2, off_ext, off_x2, br_target, seq_or_br, jmp_target;

  sign_extend #(.IN_W(4), .OUT_W(ADDR_W)) u_sext (.in(br_offset), .out(off_ext));

  always_comb begin
    pc_plus2   = pc + ADDR_W'(2);
    off_x2     = off_ext << 1;
    br_target  = pc_plus2 + off_x2;
    jmp_target = ADDR_W'({jmp_offset, 1'b0});
  end

  mux2 #(.W(ADDR_W)) u_br_mux (
    .in0(pc_plus2), .in1(br_target), .sel(branch & zero), .out(seq_or_br)
  );

  mux2 #(.W(ADDR_W)) u_jmp_mux (
    .in0(seq_or_br), .in1(jmp_target), .sel(jump), .out(pc_next)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) pc <= '0;
    else       pc <= pc_next;
  end

  // Every next-address source is even, so the PC never leaves an instruction boundary.
  a_pc_even: assert property (@(posedge clk) disable iff (reset) pc[0] == 1'b0)
    else $error("PC %0d is odd", pc);
endmodule
