// tb_reg_file: random writes and reads on both ports against a shadow copy
// of the registers kept in the testbench; checks that R0 reads 0 and R1
// reads 1 whatever is written to them, and that reset clears R2..R15.
module tb_reg_file;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, we = 0;
  logic [3:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [15:0] wd = 0, rd1, rd2;
  logic [15:0] shadow [16];

  reg_file dut (.clk, .reset, .raddr1(ra1), .raddr2(ra2), .waddr(wa), .wdata(wd), .we,
                .rdata1(rd1), .rdata2(rd2));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r); ra2 = 4'(15 - r);
      #1;
      checks++;
      if (rd1 !== shadow[r] || rd2 !== shadow[15 - r]) begin
        failures++;
        $display("read R%0d=%h R%0d=%h want %h %h", r, rd1, 15 - r, rd2, shadow[r], shadow[15 - r]);
      end
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 16'd0;
    shadow[1] = 16'd1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check_reads();
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = (i < 32) ? 4'(i) : 4'($urandom);
      wd = 16'($urandom);
      ra1 = 4'($urandom); ra2 = wa;
      #1;
      checks++;  // before the edge the write is not yet visible
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin failures++; $display("pre-edge read"); end
      @(posedge clk);
      if (we && wa > 1) shadow[wa] = wd;
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++; $display("post-edge R%0d=%h want %h", ra2, rd2, shadow[ra2]);
      end
    end
    we = 0;
    check_reads();
    reset = 1; #1;
    foreach (shadow[i]) shadow[i] = 16'd0;
    shadow[1] = 16'd1;
    reset = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
