// instr_mem: instruction memory of the HW machine.
//
// 256 bytes (8-bit address bus) organised as 128 words of 16 bits: one
// instruction per word, at even byte addresses. Address bit 0 is ignored, so
// the PC, which steps by 2, reads consecutive words. Reads are
// combinational: the instruction at the address appears at the output in the
// same cycle, as the single-cycle CPU needs. A program is written through the
// write port: on a rising clock edge with we = 1 the word at addr takes wdata.
// The word organisation and the clocked write are this design's choices.
module instr_mem
  import hw_pkg::*;
#(
  parameter int unsigned BYTES = 256
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  localparam int unsigned WORDS = BYTES / 2;
  localparam int unsigned WA_W  = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic [WA_W-1:0]   widx;

  always_comb widx = addr[WA_W:1];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  always_comb rdata = mem[widx];
endmodule
