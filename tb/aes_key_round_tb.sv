// aes_key_round_tb: expands the FIPS-197 example key 000102..0f through all
// ten rounds and compares with the published round key 10, then compares
// single steps on random keys with the reference schedule.
module aes_key_round_tb;
  import aes_ref_pkg::*;
  logic [127:0] key_in, key_out;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;
  aes_key_round dut (.key_in, .rcon, .key_out);
  initial begin
    #10000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    key_in = 128'h000102030405060708090a0b0c0d0e0f;
    rcon = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      #1 key_in = key_out;
      rcon = ref_mul(rcon, 8'h02);
    end
    checks++;
    if (key_in !== 128'h13111d7fe3944a17f307a78b4d2b30c5) begin failures++; $display("round key 10 %h", key_in); end
    for (int i = 0; i < 100; i++) begin
      key_in = rand128();
      rcon = 8'h01;
      for (int r = 1; r < 1 + (i % 10); r++) rcon = ref_mul(rcon, 8'h02);
      #1 checks++;
      if (key_out !== ref_next_key(key_in, 1 + (i % 10))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
