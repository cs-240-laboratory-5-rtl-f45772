// tb_sign_extend: checks 4-to-8 and 4-to-16 sign extension for all 16
// offsets against the signed value -8..+7 computed in the testbench.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [3:0]  in;
  logic [7:0]  o8;
  logic [15:0] o16;

  sign_extend #(.IN_W(4), .OUT_W(8))  dut8  (.in(in), .out(o8));
  sign_extend #(.IN_W(4), .OUT_W(16)) dut16 (.in(in), .out(o16));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int sv;
      in = 4'(v);
      sv = (v >= 8) ? v - 16 : v;
      #1;
      checks++; if ($signed(o8)  != sv) begin failures++; $display("8-bit: %0d -> %0d", v, $signed(o8)); end
      checks++; if ($signed(o16) != sv) begin failures++; $display("16-bit: %0d -> %0d", v, $signed(o16)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
