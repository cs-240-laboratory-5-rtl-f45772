// reg_file: the HW machine's sixteen 16-bit registers.
//
// Two combinational read ports (Read Addr 1/Read Data 1 for Rs, Read Addr
// 2/Read Data 2 for Rt) and one write port (Write Addr, Write Data, Write
// Enable = RegWrite) that writes on the rising clock edge. R0 always reads
// 0 and R1 always reads 1; writes to them are ignored. R2..R15 are general
// purpose and cleared by reset (the clearing is this design's choice; the
// ISA only defines the reset of the PC). A write is seen by the read ports
// from the next cycle on, which is what a single-cycle CPU needs.
module reg_file
  import hw_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [RIDX_W-1:0] raddr1,
  input  logic [RIDX_W-1:0] raddr2,
  input  logic [RIDX_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              we,
  output logic [DATA_W-1:0] rdata1,
  output logic [DATA_W-1:0] rdata2
);
  logic [DATA_W-1:0] regs [2:NREGS-1];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 2; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr > RIDX_W'(1)) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [DATA_W-1:0] rd(input logic [RIDX_W-1:0] a);
    if (a == RIDX_W'(0)) return DATA_W'(0);
    if (a == RIDX_W'(1)) return DATA_W'(1);
    return regs[a];
  endfunction

  always_comb begin
    rdata1 = rd(raddr1);
    rdata2 = rd(raddr2);
  end
endmodule
