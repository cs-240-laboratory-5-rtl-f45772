// tb_mux2: checks the two-input multiplexer at 16 and 4 bits with random
// inputs against sel ? in1 : in0 worked out in the testbench.
module tb_mux2;
  int checks = 0, failures = 0;
  logic [15:0] a16, b16, o16;
  logic [3:0]  a4, b4, o4;
  logic        sel;

  mux2 #(.W(16)) dut16 (.in0(a16), .in1(b16), .sel(sel), .out(o16));
  mux2 #(.W(4))  dut4  (.in0(a4),  .in1(b4),  .sel(sel), .out(o4));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); a4 = 4'($urandom); b4 = 4'($urandom);
      sel = 1'(i & 1);
      #1;
      checks++; if (o16 !== (sel ? b16 : a16)) begin failures++; $display("16-bit mismatch"); end
      checks++; if (o4  !== (sel ? b4  : a4))  begin failures++; $display("4-bit mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
