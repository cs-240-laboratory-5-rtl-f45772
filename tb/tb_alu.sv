// tb_alu: drives the ALU with the four ALUOp codes the HW ISA uses (ADD,
// SUB, AND, OR) and the remaining Ainv/Bneg combinations, on random and
// corner operands. Expected result, Zero and overflow are computed in the
// testbench with integer arithmetic.
module tb_alu;
  import hw_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b, res;
  alu_op_t op;
  logic zero, ovf;

  alu dut (.a, .b, .op, .result(res), .zero, .overflow(ovf));

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic [15:0] ea, eb, input alu_op_t o);
    logic [15:0] x, y, er;
    logic eo;
    int s;
    a = ea; b = eb; op = o;
    #1;
    x = o.ainv ? ~ea : ea;
    y = o.bneg ? ~eb : eb;
    eo = 0;
    case (o.fn)
      ALU_AND: er = x & y;
      ALU_OR:  er = x | y;
      ALU_ADD: begin
        s = int'($signed(x)) + int'($signed(y)) + (o.bneg ? 1 : 0);
        er = 16'(s);
        eo = (s > 32767) || (s < -32768);
      end
      default: er = 16'd0;
    endcase
    checks++;
    if (res !== er || zero !== (er == 16'd0) || ovf !== eo) begin
      failures++;
      $display("a=%h b=%h op=%b: got %h z%b v%b, want %h z%b v%b", ea, eb, o, res, zero, ovf,
               er, er == 16'd0, eo);
    end
  endtask

  initial begin
    // SUB of equal values gives Zero (how BEQ decides)
    check(16'h1234, 16'h1234, '{ainv:0, bneg:1, fn:ALU_ADD});
    // signed overflow cases
    check(16'h7fff, 16'h0001, '{ainv:0, bneg:0, fn:ALU_ADD});
    check(16'h8000, 16'h0001, '{ainv:0, bneg:1, fn:ALU_ADD});
    check(16'hffff, 16'h0001, '{ainv:0, bneg:0, fn:ALU_ADD});
    for (int i = 0; i < 4000; i++) begin
      alu_op_t o;
      o = alu_op_t'($urandom);
      check(16'($urandom), (i % 7 == 0) ? a : 16'($urandom), o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
