// hw_pkg: widths, opcodes and control-signal types shared by the HW machine.
//
// The HW instruction set has an 8-bit address bus, a 16-bit data bus and
// sixteen 16-bit registers. Every instruction is one 16-bit word split into
// four 4-bit fields: opcode [15:12], Rs [11:8], Rt [7:4] and Rd/offset [3:0];
// JMP uses bits [11:0] as one 12-bit offset. The opcode values are the ones
// of the HW ISA. The ALU control word holds Ainv, Bneg and a 2-bit operation
// (00 AND, 01 OR, 10 add). The encoding of the unused opcodes (0110, 1001 to
// 1111) and the meaning of operation 11 are choices of this design.
package hw_pkg;

  localparam int unsigned ADDR_W = 8;   // address bus
  localparam int unsigned DATA_W = 16;  // data bus, instruction width
  localparam int unsigned NREGS  = 16;  // registers R0..R15
  localparam int unsigned RIDX_W = 4;   // register index width

  typedef enum logic [3:0] {
    OP_LW  = 4'b0000,
    OP_SW  = 4'b0001,
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_AND = 4'b0100,
    OP_OR  = 4'b0101,
    OP_BEQ = 4'b0111,
    OP_JMP = 4'b1000
  } opcode_e;

  // 2-bit ALU operation field
  typedef enum logic [1:0] {
    ALU_AND = 2'b00,
    ALU_OR  = 2'b01,
    ALU_ADD = 2'b10,
    ALU_NONE = 2'b11   // not defined by the ISA: the ALU returns 0
  } alu_fn_e;

  typedef struct packed {
    logic    ainv;  // invert operand A
    logic    bneg;  // negate operand B (invert and carry-in 1)
    alu_fn_e fn;    // Op1, Op0
  } alu_op_t;

  typedef struct packed {
    alu_op_t alu_op;     // ALUOp
    logic    reg_write;  // RegWrite
    logic    mem;        // Mem: LW or SW (Rt as write address, offset as ALU B, memory as write-back)
    logic    mem_store;  // Mem Store: data memory write enable (SW)
    logic    branch;     // Branch: BEQ
    logic    jump;       // Jump: JMP
  } ctrl_t;

  // Instruction fields
  function automatic logic [3:0] f_op(input logic [DATA_W-1:0] i);
    return i[15:12];
  endfunction
  function automatic logic [3:0] f_rs(input logic [DATA_W-1:0] i);
    return i[11:8];
  endfunction
  function automatic logic [3:0] f_rt(input logic [DATA_W-1:0] i);
    return i[7:4];
  endfunction
  function automatic logic [3:0] f_rd(input logic [DATA_W-1:0] i);
    return i[3:0];
  endfunction

endpackage
