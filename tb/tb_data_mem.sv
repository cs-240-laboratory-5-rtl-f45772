// tb_data_mem: fills the memory, then mixes random reads and writes,
// comparing every read with a shadow array. Only the low 8 bits of the
// 16-bit address select the word.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] shadow [256];

  data_mem dut (.clk, .addr, .wdata, .we, .rdata);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; addr = {8'($urandom), 8'(i)}; wdata = 16'($urandom);
      shadow[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 16'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr[7:0]]) begin
        failures++; $display("read %h: got %h want %h", addr, rdata, shadow[addr[7:0]]);
      end
      @(posedge clk);
      if (we) shadow[addr[7:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
