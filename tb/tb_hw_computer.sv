// tb_hw_computer: end-to-end test of the complete HW machine at its default
// sizes. Each program is written into instruction memory through the load
// path (reset and LOAD held, one word per clock with WR), then run from
// reset. An instruction-level reference model runs in lock step: before
// every clock edge the PC, both register read ports and the ALU result are
// compared with it, and after the edge the new PC.
//
// Program 1 sums 5+4+3+2+1 in a loop closed by JMP, stores the sum with SW,
// reads it back with LW, skips an instruction with a taken BEQ, writes to R0
// (ignored), executes an undefined opcode (no effect), then doubles a
// register in a loop closed by a BEQ with a negative offset until the value
// overflows to zero, and ends in a JMP to itself.
// Program 2 is the worked example: BEQ R3 R0 1 at address 6 goes to 10 when
// R3 is 0 and to 8 otherwise; JMP 3 returns to address 6.
// Every mechanism is counted; one that never happened is a failure.
module tb_hw_computer;
  import hw_iss_pkg::*;
  int checks = 0, failures = 0;
  int n_load = 0, n_taken = 0, n_not_taken = 0, n_neg_branch = 0, n_jump = 0, n_lw = 0, n_sw = 0;
  int n_ovf = 0, n_r0 = 0, n_undef = 0, n_add = 0, n_sub = 0, n_and = 0, n_or = 0;
  logic clk = 0, reset = 1, load = 0, wr = 0;
  logic [7:0]  addr_in = 0;
  logic [15:0] data_in = 0;
  logic [7:0]  pc;
  logic [15:0] instruction, rf1, rf2, alu_result;
  logic        zero, overflow;
  logic [15:0] prog [$];
  hw_iss iss;

  hw_computer dut (.clk, .reset, .load, .wr, .addr_in, .data_in, .pc, .instruction, .rf1, .rf2,
                   .alu_result, .zero, .overflow);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [3:0] LW = 4'b0000, SW = 4'b0001, ADD = 4'b0010, SUB = 4'b0011,
                         AND = 4'b0100, OR = 4'b0101, BEQ = 4'b0111, UND = 4'b0110;

  // write prog[] at byte addresses 0, 2, 4, ... through the load path, CPU held in reset
  task automatic load_program();
    @(negedge clk);
    reset = 1; load = 1;
    foreach (prog[i]) begin
      addr_in = 8'(2 * i); data_in = prog[i]; wr = 1;
      @(negedge clk);
      n_load++;
    end
    wr = 0;
    // read back through the same path
    foreach (prog[i]) begin
      addr_in = 8'(2 * i); #1;
      checks++;
      if (instruction !== prog[i]) begin failures++; $display("load path word %0d", i); end
    end
    load = 0;
  endtask

  task automatic expect_eq(input logic [15:0] got, want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: %h want %h", what, got, want); end
  endtask

  // run from reset for a number of cycles in lock step with the reference model
  task automatic run(input int cycles, inout logic [7:0] trace [$]);
    iss = new();
    @(negedge clk) reset = 0;
    for (int c = 0; c < cycles; c++) begin
      logic [15:0] a_exp, b_exp;
      trace.push_back(pc);
      a_exp = iss.rd(instruction[11:8]);
      b_exp = iss.rd(instruction[7:4]);
      iss.step(instruction, 16'd0);
      checks++;
      if (rf1 !== a_exp || rf2 !== b_exp) begin
        failures++; $display("pc %0d: read ports %h %h want %h %h", pc, rf1, rf2, a_exp, b_exp);
      end
      if (iss.exp_alu_valid) begin
        checks++;
        if (alu_result !== iss.exp_alu || zero !== (iss.exp_alu == 16'd0)) begin
          failures++; $display("pc %0d: alu %h want %h", pc, alu_result, iss.exp_alu);
        end
      end
      if (instruction[15:12] inside {ADD, SUB}) begin
        checks++;
        if (overflow !== iss.ovf) begin failures++; $display("pc %0d: overflow flag", pc); end
      end
      n_taken += int'(iss.branch_taken); n_not_taken += int'(iss.branch_not_taken);
      n_neg_branch += int'(iss.branch_taken && instruction[3]);
      n_jump += int'(iss.jumped); n_ovf += int'(iss.ovf); n_r0 += int'(iss.r0_write);
      case (instruction[15:12])
        LW: n_lw++;  SW: n_sw++;  ADD: n_add++;  SUB: n_sub++;
        AND: n_and++; OR: n_or++; UND: n_undef++;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (pc !== iss.pc) begin failures++; $display("next pc %0d want %0d", pc, iss.pc); iss.pc = pc; end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] trace [$];
    // ---------------- program 1 ----------------
    prog = {
      enc(ADD, 1, 1, 2),        //  0: R2 = 2
      enc(ADD, 2, 2, 3),        //  2: R3 = 4
      enc(ADD, 3, 1, 3),        //  4: R3 = 5       loop counter n
      enc(AND, 0, 0, 4),        //  6: R4 = 0       sum
      enc(BEQ, 3, 0, 3),        //  8: if n == 0 goto 16
      enc(ADD, 4, 3, 4),        // 10: sum += n
      enc(SUB, 3, 1, 3),        // 12: n -= 1
      enc_jmp(12'd4),           // 14: goto 8
      enc(SW, 2, 4, 3),         // 16: M[R2 + 3] = sum
      enc(LW, 2, 5, 3),         // 18: R5 = M[R2 + 3]
      enc(OR, 5, 2, 6),         // 20: R6 = R5 | R2
      enc(BEQ, 6, 4, 1),        // 22: R6 == R4 (15): skip 24
      enc(ADD, 1, 1, 7),        // 24: skipped, R7 stays 0
      enc(ADD, 1, 1, 0),        // 26: write to R0, ignored
      enc(UND, 1, 1, 8),        // 28: undefined opcode, R8 stays 0
      enc(ADD, 1, 0, 10),       // 30: R10 = 1
      enc(ADD, 10, 10, 10),     // 32: R10 = 2 * R10
      enc(BEQ, 10, 0, 1),       // 34: R10 == 0: leave the loop to 38
      enc(BEQ, 0, 0, 4'hd),     // 36: always taken, offset -3: back to 32
      enc(SUB, 0, 7, 9),        // 38: R9 = 0 - R7 = 0
      enc(OR, 4, 5, 11),        // 40: R11 = sum
      enc_jmp(12'd21)           // 42: stop here
    };
    load_program();
    run(90, trace);
    // results, taken from the reference model that was compared above
    expect_eq(iss.regs[4], 16'd15, "sum R4");
    expect_eq(iss.regs[5], 16'd15, "loaded R5");
    expect_eq(iss.regs[7], 16'd0, "skipped R7");
    expect_eq(iss.regs[8], 16'd0, "undefined opcode R8");
    expect_eq(iss.regs[10], 16'd0, "doubled R10");
    expect_eq(iss.regs[11], 16'd15, "R11");
    expect_eq(16'(pc), 16'd42, "final PC");

    // ---------------- program 2, R3 = 0: BEQ at 6 taken ----------------
    trace = {};
    prog = {
      enc(AND, 0, 0, 3),        //  0: R3 = 0
      enc(ADD, 1, 1, 5),        //  2
      enc(ADD, 1, 0, 6),        //  4
      enc(BEQ, 3, 0, 1),        //  6: BEQ R3 R0 1
      enc(ADD, 1, 2, 2),        //  8: ADD R1 R2 R2
      enc(AND, 0, 0, 4),        // 10: AND R0 R0 R4
      enc_jmp(12'd3)            // 12: JMP 3
    };
    load_program();
    run(8, trace);
    begin
      logic [7:0] want [$] = '{8'd0, 8'd2, 8'd4, 8'd6, 8'd10, 8'd12, 8'd6, 8'd10};
      foreach (want[i]) expect_eq(16'(trace[i]), 16'(want[i]), $sformatf("trace 1 step %0d", i));
    end
    // ---------------- program 2, R3 = 1: BEQ at 6 not taken ----------------
    trace = {};
    prog[0] = enc(ADD, 1, 0, 3);  // R3 = 1
    load_program();
    run(8, trace);
    begin
      logic [7:0] want [$] = '{8'd0, 8'd2, 8'd4, 8'd6, 8'd8, 8'd10, 8'd12, 8'd6};
      foreach (want[i]) expect_eq(16'(trace[i]), 16'(want[i]), $sformatf("trace 2 step %0d", i));
    end

    $display("loaded %0d, taken %0d, not taken %0d, backward %0d, jumps %0d, LW %0d, SW %0d",
             n_load, n_taken, n_not_taken, n_neg_branch, n_jump, n_lw, n_sw);
    $display("ADD %0d, SUB %0d, AND %0d, OR %0d, overflows %0d, R0 writes %0d, undefined %0d",
             n_add, n_sub, n_and, n_or, n_ovf, n_r0, n_undef);
    checks++; if (n_load == 0)       begin failures++; $display("no program load"); end
    checks++; if (n_taken == 0)      begin failures++; $display("no taken branch"); end
    checks++; if (n_not_taken == 0)  begin failures++; $display("no untaken branch"); end
    checks++; if (n_neg_branch == 0) begin failures++; $display("no backward branch"); end
    checks++; if (n_jump == 0)       begin failures++; $display("no jump"); end
    checks++; if (n_lw == 0)         begin failures++; $display("no LW"); end
    checks++; if (n_sw == 0)         begin failures++; $display("no SW"); end
    checks++; if (n_add == 0 || n_sub == 0 || n_and == 0 || n_or == 0) begin failures++; $display("ALU op missing"); end
    checks++; if (n_ovf == 0)        begin failures++; $display("no overflow"); end
    checks++; if (n_r0 == 0)         begin failures++; $display("no write to R0"); end
    checks++; if (n_undef == 0)      begin failures++; $display("no undefined opcode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
