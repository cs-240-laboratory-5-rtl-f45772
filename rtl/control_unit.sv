// control_unit: decodes the 4-bit opcode into the HW datapath's control lines.
//
// ALUOp and RegWrite follow the ISA's control table: ADD 0010/1, SUB 0110/1,
// AND 0000/1, OR 0001/1, BEQ 0110/0 and JMP don't-care/0 (driven as 0000).
// LW and SW compute Rs + offset, so they use ALUOp 0010; LW writes a
// register, SW does not. Mem is 1 for LW and SW: it steers the write address
// to Rt, the ALU's second input to the sign-extended offset and the
// write-back to memory data. Mem Store is 1 for SW, Branch for BEQ, Jump for
// JMP. The unused opcodes do nothing (all lines 0), a choice of this design.
// Purely combinational.
module control_unit
  import hw_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);
  localparam alu_op_t ADD_OP = '{ainv: 1'b0, bneg: 1'b0, fn: ALU_ADD};
  localparam alu_op_t SUB_OP = '{ainv: 1'b0, bneg: 1'b1, fn: ALU_ADD};
  localparam alu_op_t AND_OP = '{ainv: 1'b0, bneg: 1'b0, fn: ALU_AND};
  localparam alu_op_t OR_OP  = '{ainv: 1'b0, bneg: 1'b0, fn: ALU_OR};

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = AND_OP;
    case (opcode)
      OP_ADD: begin ctrl.alu_op = ADD_OP; ctrl.reg_write = 1'b1; end
      OP_SUB: begin ctrl.alu_op = SUB_OP; ctrl.reg_write = 1'b1; end
      OP_AND: begin ctrl.alu_op = AND_OP; ctrl.reg_write = 1'b1; end
      OP_OR:  begin ctrl.alu_op = OR_OP;  ctrl.reg_write = 1'b1; end
      OP_LW:  begin ctrl.alu_op = ADD_OP; ctrl.reg_write = 1'b1; ctrl.mem = 1'b1; end
      OP_SW:  begin ctrl.alu_op = ADD_OP; ctrl.mem = 1'b1; ctrl.mem_store = 1'b1; end
      OP_BEQ: begin ctrl.alu_op = SUB_OP; ctrl.branch = 1'b1; end
      OP_JMP: begin ctrl.jump = 1'b1; end
      default: ;
    endcase
  end
endmodule
