// tb_cpu: runs the CPU against the instruction-level reference model in
// lock step. The testbench holds the instruction memory (128 random words,
// mostly defined opcodes, after a prologue that sets R2..R15 to powers of
// two and stores some of them, so loads find data and sums can overflow).
// Before every rising edge it compares the PC, both register read ports and
// the ALU result with the model, then steps the model. It also counts the
// taken and not-taken branches, jumps, loads, stores and overflows seen, and
// fails if any of them never happened. Several seeds are run, each from reset.
module tb_cpu;
  import hw_iss_pkg::*;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_jump = 0, n_lw = 0, n_sw = 0, n_ovf = 0, n_r01 = 0;
  logic clk = 0, reset = 1;
  logic [15:0] imem [128];
  logic [15:0] instr, rf1, rf2, alu_result;
  logic [7:0]  pc;
  logic        zero, overflow;

  cpu dut (.clk, .reset, .instr, .pc, .rf1, .rf2, .alu_result, .zero, .overflow);

  always_comb instr = imem[pc[7:1]];
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [15:0] rand_instr();
    logic [3:0] ops [9] = '{4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0000, 4'b0001, 4'b0111,
                            4'b1000, 4'b0110};
    int k;
    k = int'($urandom % 20);
    if (k >= 9) k = int'($urandom % 4);      // arithmetic/logic most of the time
    if (k == 7 && ($urandom % 2)) k = 6;     // fewer jumps
    if (k == 8 && ($urandom % 4)) k = 0;     // rare undefined opcode
    return {ops[k], 4'($urandom), 4'($urandom), 4'($urandom)};
  endfunction

  initial begin
    hw_iss iss;
    for (int seed = 0; seed < 8; seed++) begin
      iss = new();
      // prologue: build values, then store them, so later loads hit written words
      for (int i = 0; i < 14; i++) imem[i] = enc(4'b0010, 4'(i + 1), 4'(i + 1), 4'(i + 2));
      for (int i = 14; i < 24; i++) imem[i] = enc(4'b0001, 4'($urandom), 4'($urandom), 4'($urandom));
      for (int i = 24; i < 128; i++) imem[i] = rand_instr();
      reset = 1;
      @(posedge clk); @(negedge clk);
      reset = 0;
      for (int cyc = 0; cyc < 600; cyc++) begin
        logic [15:0] peek, a_exp, b_exp;
        a_exp = iss.rd(instr[11:8]);
        b_exp = iss.rd(instr[7:4]);
        peek = iss.needs_peek(instr) ? dut.u_dmem.mem[iss.mem_index(instr)] : 16'd0;
        iss.step(instr, peek);
        checks++;
        if (rf1 !== a_exp || rf2 !== b_exp) begin
          failures++; $display("pc %0d: read ports %h %h want %h %h", pc, rf1, rf2, a_exp, b_exp);
        end
        if (iss.exp_alu_valid) begin
          checks++;
          if (alu_result !== iss.exp_alu) begin
            failures++; $display("pc %0d instr %h: alu %h want %h", pc, instr, alu_result, iss.exp_alu);
          end
        end
        if ((instr[15:12] == 4'b0010 || instr[15:12] == 4'b0011)) begin
          checks++;
          if (overflow !== iss.ovf) begin failures++; $display("pc %0d: overflow flag", pc); end
        end
        n_taken += int'(iss.branch_taken); n_not_taken += int'(iss.branch_not_taken);
        n_jump += int'(iss.jumped); n_ovf += int'(iss.ovf);
        n_r01 += int'(iss.r0_write || iss.r1_write);
        n_lw += int'(instr[15:12] == 4'b0000); n_sw += int'(instr[15:12] == 4'b0001);
        @(posedge clk); #1;
        checks++;
        if (pc !== iss.pc) begin
          failures++; $display("next pc %0d want %0d", pc, iss.pc);
          iss.pc = pc;  // resynchronise so one error is not counted forever
        end
        @(negedge clk);
      end
    end
    $display("branches taken %0d, not taken %0d, jumps %0d, loads %0d, stores %0d, overflows %0d, R0/R1 writes %0d",
             n_taken, n_not_taken, n_jump, n_lw, n_sw, n_ovf, n_r01);
    checks++; if (n_taken == 0)     begin failures++; $display("no taken branch"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("no untaken branch"); end
    checks++; if (n_jump == 0)      begin failures++; $display("no jump"); end
    checks++; if (n_lw == 0)        begin failures++; $display("no load"); end
    checks++; if (n_sw == 0)        begin failures++; $display("no store"); end
    checks++; if (n_ovf == 0)       begin failures++; $display("no overflow"); end
    checks++; if (n_r01 == 0)       begin failures++; $display("no write to R0/R1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
