// tb_instr_fetch: checks the PC logic. Reset gives PC = 0; without branch
// or jump the PC steps by 2; the worked example of a BEQ at address 6 with
// offset 1 goes to 10 when Zero is set and to 8 when it is not; JMP 3 goes
// to 6; then random offsets, Branch, Zero and Jump are compared against the
// next-PC formulas PC+2, PC+2+2*offset and offset*2.
module tb_instr_fetch;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  logic [3:0] br_offset = 0;
  logic [11:0] jmp_offset = 0;
  logic branch = 0, zero = 0, jump = 0;
  logic [7:0] pc, pc_next;

  instr_fetch dut (.clk, .reset, .br_offset, .jmp_offset, .branch, .zero, .jump, .pc, .pc_next);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_pc(input logic [7:0] e, input string what);
    checks++;
    if (pc !== e) begin failures++; $display("%s: pc=%0d want %0d", what, pc, e); end
  endtask

  task automatic step(input logic b, z, j, input logic [3:0] bo, input logic [11:0] jo);
    @(negedge clk);
    branch = b; zero = z; jump = j; br_offset = bo; jmp_offset = jo;
    @(posedge clk); #1;
  endtask

  initial begin
    @(posedge clk); #1;
    expect_pc(8'd0, "reset");
    reset = 0;
    step(0, 0, 0, 0, 0); expect_pc(8'd2, "sequential");
    step(0, 1, 0, 4'd5, 0); expect_pc(8'd4, "zero without branch");
    step(1, 0, 0, 4'd5, 0); expect_pc(8'd6, "branch without zero");
    // BEQ R3 R0 1 at address 6, R3 == 0
    step(1, 1, 0, 4'd1, 0); expect_pc(8'd10, "BEQ taken from 6");
    // back to 6 by JMP 3, then the not-taken case
    step(0, 0, 1, 0, 12'd3); expect_pc(8'd6, "JMP 3");
    step(1, 0, 0, 4'd1, 0); expect_pc(8'd8, "BEQ not taken from 6");
    // negative offset: -8 instructions
    step(1, 1, 0, 4'b1000, 0); expect_pc(8'(8 + 2 - 16), "BEQ offset -8");
    for (int i = 0; i < 2000; i++) begin
      logic b, z, j;
      logic [3:0] bo;
      logic [11:0] jo;
      logic [7:0] e;
      int so;
      b = 1'($urandom); z = 1'($urandom); j = (($urandom % 6) == 0); bo = 4'($urandom); jo = 12'($urandom);
      so = (bo >= 8) ? int'(bo) - 16 : int'(bo);
      if (j)          e = 8'(jo * 2);
      else if (b & z) e = 8'(int'(pc) + 2 + 2 * so);
      else            e = pc + 8'd2;
      step(b, z, j, bo, jo);
      expect_pc(e, "random");
    end
    @(negedge clk) reset = 1; #1;
    expect_pc(8'd0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
