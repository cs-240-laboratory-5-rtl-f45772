// tb_control_unit: checks every opcode against the HW control table
// (ALUOp = Ainv Bneg Op1 Op0, RegWrite) and the memory, branch and jump
// lines, written out here as literal bit patterns.
module tb_control_unit;
  import hw_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] opcode;
  ctrl_t ctrl;

  control_unit dut (.opcode, .ctrl);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected {aluop[3:0], regwrite, mem, memstore, branch, jump}
  function automatic logic [8:0] expect_of(input logic [3:0] o);
    case (o)
      4'b0010: return 9'b0010_1_0_0_0_0; // ADD
      4'b0011: return 9'b0110_1_0_0_0_0; // SUB
      4'b0100: return 9'b0000_1_0_0_0_0; // AND
      4'b0101: return 9'b0001_1_0_0_0_0; // OR
      4'b0000: return 9'b0010_1_1_0_0_0; // LW
      4'b0001: return 9'b0010_0_1_1_0_0; // SW
      4'b0111: return 9'b0110_0_0_0_1_0; // BEQ
      4'b1000: return 9'b0000_0_0_0_0_1; // JMP (ALUOp don't care)
      default: return 9'b0000_0_0_0_0_0;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 16; o++) begin
      logic [8:0] e, g;
      opcode = 4'(o);
      #1;
      e = expect_of(4'(o));
      g = {ctrl.alu_op, ctrl.reg_write, ctrl.mem, ctrl.mem_store, ctrl.branch, ctrl.jump};
      if (o == 8) begin e[8:5] = 4'b0; g[8:5] = 4'b0; end
      checks++;
      if (g !== e) begin failures++; $display("opcode %b: got %b want %b", 4'(o), g, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
