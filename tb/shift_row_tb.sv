// shift_row_tb: compares ShiftRows with the reference on random states and
// on the FIPS-197 example (round 1 after SubBytes).
module shift_row_tb;
  import aes_ref_pkg::*;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;
  shift_row dut (.data_in, .data_out);
  initial begin
    #10000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    data_in = 128'h63cab7040953d051cd60e0e7ba70e18c; #1;
    checks++;
    if (data_out !== 128'h6353e08c0960e104cd70b751bacad0e7) failures++;
    for (int i = 0; i < 100; i++) begin
      data_in = rand128(); #1;
      checks++;
      if (data_out !== ref_shift_rows(data_in)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
