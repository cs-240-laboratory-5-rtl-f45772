// data_mem: data memory of the HW machine, used by LW and SW.
//
// The address is the 16-bit ALU result (Rs + sign-extended offset); the low
// AW bits select one 16-bit word, so the default holds 2^8 words, matching
// the machine's 8-bit address bus. Reads are combinational (Read Data follows
// Address within the cycle); a write of Write Data happens on the rising
// clock edge when Write Enable (Mem Store) is 1. Word addressing, the size
// and the read/write timing are this design's choices: the original circuit fixes only the
// memory's pins. The contents are not cleared by reset.
module data_mem
  import hw_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              we,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW-1:0]] <= wdata;
  end

  always_comb rdata = mem[addr[AW-1:0]];
endmodule
