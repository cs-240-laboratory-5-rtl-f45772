// hw_iss_pkg: instruction-level reference model of the HW machine for the
// testbenches, plus a small assembler.
//
// The model executes one instruction per step straight from the ISA
// definitions (R[d] = R[s] op R[t], LW/SW at R[s] + offset, BEQ to
// PC + 2 + 2*offset when R[s] == R[t], JMP to offset*2, R0 = 0, R1 = 1).
// Data memory words never written by the model are marked unknown; for a
// load from one the caller supplies the value the design holds.
package hw_iss_pkg;

  function automatic logic [15:0] enc(input logic [3:0] op, input logic [3:0] s,
                                      input logic [3:0] t, input logic [3:0] d);
    return {op, s, t, d};
  endfunction
  function automatic logic [15:0] enc_jmp(input logic [11:0] off);
    return {4'b1000, off};
  endfunction

  class hw_iss;
    logic [15:0] regs [16];
    logic [15:0] dmem [256];
    bit          dvalid [256];
    logic [7:0]  pc;
    // last step's observations
    logic [15:0] exp_alu;
    bit          exp_alu_valid;
    bit          branch_taken, branch_not_taken, jumped, ovf, r0_write, r1_write;

    function new();
      reset();
      foreach (dvalid[i]) dvalid[i] = 0;
    endfunction

    function void reset();
      foreach (regs[i]) regs[i] = 16'd0;
      regs[1] = 16'd1;
      pc = 8'd0;
    endfunction

    static function logic [15:0] sext(input logic [3:0] v);
      return {{12{v[3]}}, v};
    endfunction

    function logic [15:0] rd(input logic [3:0] a);
      if (a == 0) return 16'd0;
      if (a == 1) return 16'd1;
      return regs[a];
    endfunction

    function void wr(input logic [3:0] a, input logic [15:0] v);
      if (a == 0) r0_write = 1;
      if (a == 1) r1_write = 1;
      if (a > 1) regs[a] = v;
    endfunction

    // data-memory word index a load or store would touch
    function logic [7:0] mem_index(input logic [15:0] ins);
      logic [15:0] sum;
      sum = rd(ins[11:8]) + sext(ins[3:0]);
      return sum[7:0];
    endfunction

    function bit needs_peek(input logic [15:0] ins);
      return ins[15:12] == 4'b0000 && !dvalid[mem_index(ins)];
    endfunction

    function void step(input logic [15:0] ins, input logic [15:0] peek);
      logic [3:0] op, s, t, d;
      logic [15:0] a, b, r;
      int sa, sb, ss;
      op = ins[15:12]; s = ins[11:8]; t = ins[7:4]; d = ins[3:0];
      a = rd(s); b = rd(t);
      exp_alu_valid = 1; exp_alu = 16'd0;
      branch_taken = 0; branch_not_taken = 0; jumped = 0; ovf = 0;
      r0_write = 0; r1_write = 0;
      sa = int'($signed(a)); sb = int'($signed(b));
      case (op)
        4'b0010: begin r = a + b; ss = sa + sb; ovf = (ss > 32767 || ss < -32768);
                       exp_alu = r; wr(d, r); pc = pc + 8'd2; end
        4'b0011: begin r = a - b; ss = sa - sb; ovf = (ss > 32767 || ss < -32768);
                       exp_alu = r; wr(d, r); pc = pc + 8'd2; end
        4'b0100: begin r = a & b; exp_alu = r; wr(d, r); pc = pc + 8'd2; end
        4'b0101: begin r = a | b; exp_alu = r; wr(d, r); pc = pc + 8'd2; end
        4'b0000: begin
          logic [7:0] i;
          exp_alu = a + sext(d); i = exp_alu[7:0];
          if (!dvalid[i]) begin dmem[i] = peek; dvalid[i] = 1; end
          wr(t, dmem[i]); pc = pc + 8'd2;
        end
        4'b0001: begin
          logic [7:0] i;
          exp_alu = a + sext(d); i = exp_alu[7:0];
          dmem[i] = b; dvalid[i] = 1; pc = pc + 8'd2;
        end
        4'b0111: begin
          exp_alu = a - b;
          if (a == b) begin branch_taken = 1; r = sext(d); pc = pc + 8'd2 + {r[6:0], 1'b0}; end
          else begin branch_not_taken = 1; pc = pc + 8'd2; end
        end
        4'b1000: begin exp_alu_valid = 0; jumped = 1; pc = {ins[6:0], 1'b0}; end
        default: begin exp_alu_valid = 0; pc = pc + 8'd2; end
      endcase
    endfunction
  endclass

endpackage
