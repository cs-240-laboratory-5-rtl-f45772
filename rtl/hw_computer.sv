// hw_computer: the complete HW machine, CPU plus instruction memory.
//
// The CPU fetches from the instruction memory at its PC. A load path lets an
// operator put a program into the memory: with load = 1 the memory address
// comes from addr_in instead of the PC (the two tri-state buffer banks of the
// original circuit become one MUX here), and with wr = 1 the word data_in is
// written at the next rising clock edge. To load, hold reset, set load, and
// write one word per clock; then release load and reset and clock the CPU.
// Observation ports show the PC, the instruction, both register-file read
// ports, the ALU result, Zero and overflow. Holding the CPU in reset while
// loading and the clocked write are this design's choices.
module hw_computer
  import hw_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              load,
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [DATA_W-1:0] data_in,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] instruction,
  output logic [DATA_W-1:0] rf1,
  output logic [DATA_W-1:0] rf2,
  output logic [DATA_W-1:0] alu_result,
  output logic              zero,
  output logic              overflow
);
  logic [ADDR_W-1:0] imem_addr;

  mux2 #(.W(ADDR_W)) u_addr_sel (
    .in0(pc), .in1(addr_in), .sel(load), .out(imem_addr)
  );

  instr_mem u_imem (
    .clk,
    .addr (imem_addr),
    .we   (wr),
    .wdata(data_in),
    .rdata(instruction)
  );

  cpu u_cpu (
    .clk, .reset,
    .instr(instruction),
    .pc, .rf1, .rf2, .alu_result, .zero, .overflow
  );
endmodule
