// tb_instr_mem: writes all 128 instruction words at even byte addresses,
// then reads them back at even and odd addresses (bit 0 is ignored) and
// rewrites random words, comparing with a shadow array.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] shadow [128];

  instr_mem dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1; addr = 8'(2 * i); wdata = 16'($urandom);
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (rdata !== shadow[i / 2]) begin failures++; $display("addr %0d: %h want %h", i, rdata, shadow[i / 2]); end
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 8'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr[7:1]]) begin failures++; $display("mixed read mismatch"); end
      @(posedge clk);
      if (we) shadow[addr[7:1]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
