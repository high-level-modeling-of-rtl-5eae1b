// inverter_tb: exhaustive check of a 2-bit inverter.
module inverter_tb;
  logic [1:0] in, out;
  int checks = 0, failures = 0;
  inverter #(.WIDTH(2)) dut (.in, .out);
  initial begin
    #1000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      in = 2'(i); #1;
      checks++;
      if (out !== 2'(3 - i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
