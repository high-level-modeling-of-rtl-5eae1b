// majority_tb: exhaustive check of the three-input majority gate against
// a count of ones.
module majority_tb;
  logic in1, in2, in3, out;
  int checks = 0, failures = 0;
  majority dut (.in1, .in2, .in3, .out);
  initial begin
    #1000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {in1, in2, in3} = 3'(i); #1;
      checks++;
      if (out !== ((32'(in1) + 32'(in2) + 32'(in3)) >= 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
