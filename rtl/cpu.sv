// cpu: single-cycle CPU of the HW machine.
//
// Each rising clock edge completes one instruction. The instruction word
// comes in from the external instruction memory at address pc. The control
// unit decodes the opcode; the register file reads Rs and Rt; a 2x16 MUX
// gives the ALU Rt's value or the sign-extended 4-bit offset (Mem); the ALU
// result either goes back to the register file or serves as the data-memory
// address; a 2x4 MUX picks Rd or Rt (Mem) as the register written; the
// write-back MUX picks the ALU result or the memory data (Mem). BEQ
// subtracts and branches on Zero; JMP is handled by the fetch logic alone.
// Observation outputs carry Read Data 1 and 2, the ALU result and flags.
// Data-memory writes are blocked while reset is held, so a program can be
// loaded into instruction memory under reset (this design's choice). Reset
// therefore feeds both the asynchronous resets and that synchronous write
// enable; lint may note the mix, and it is intended.
module cpu
  import hw_pkg::*;
#(
  parameter int unsigned DMEM_AW = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [DATA_W-1:0] instr,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] rf1,
  output logic [DATA_W-1:0] rf2,
  output logic [DATA_W-1:0] alu_result,
  output logic              zero,
  output logic              overflow
);
  ctrl_t             ctrl;
  logic [RIDX_W-1:0] waddr;
  logic [DATA_W-1:0] off_ext, alu_b, mem_rdata, wb_data;

  control_unit u_ctrl (.opcode(f_op(instr)), .ctrl(ctrl));

  instr_fetch u_fetch (
    .clk, .reset,
    .br_offset (f_rd(instr)),
    .jmp_offset(instr[11:0]),
    .branch    (ctrl.branch),
    .zero,
    .jump      (ctrl.jump),
    .pc,
    .pc_next()
  );

  mux2 #(.W(RIDX_W)) u_waddr_mux (
    .in0(f_rd(instr)), .in1(f_rt(instr)), .sel(ctrl.mem), .out(waddr)
  );

  reg_file u_rf (
    .clk, .reset,
    .raddr1(f_rs(instr)),
    .raddr2(f_rt(instr)),
    .waddr,
    .wdata (wb_data),
    .we    (ctrl.reg_write),
    .rdata1(rf1),
    .rdata2(rf2)
  );

  sign_extend #(.IN_W(4), .OUT_W(DATA_W)) u_sext (.in(f_rd(instr)), .out(off_ext));

  mux2 #(.W(DATA_W)) u_alub_mux (
    .in0(rf2), .in1(off_ext), .sel(ctrl.mem), .out(alu_b)
  );

  alu #(.W(DATA_W)) u_alu (
    .a(rf1), .b(alu_b), .op(ctrl.alu_op),
    .result(alu_result), .zero, .overflow
  );

  data_mem #(.AW(DMEM_AW)) u_dmem (
    .clk,
    .addr (alu_result),
    .wdata(rf2),
    .we   (ctrl.mem_store & ~reset),
    .rdata(mem_rdata)
  );

  mux2 #(.W(DATA_W)) u_wb_mux (
    .in0(alu_result), .in1(mem_rdata), .sel(ctrl.mem), .out(wb_data)
  );
endmodule
