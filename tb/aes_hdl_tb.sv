// aes_hdl_tb: streams blocks through the conventional pipeline, one per
// clock with gaps, each with its own key. The first block is the FIPS-197
// AES-128 example (plaintext 00112233..ff, key 000102..0f, ciphertext
// 69c4e0d8..c55a). Every output must appear exactly 10 clocks after its
// input and match the reference; out_valid must follow in_valid.
module aes_hdl_tb;
  import aes_ref_pkg::*;
  localparam int unsigned LAT = 10;
  localparam int unsigned N   = 200;
  logic clk = 0, rst_n, in_valid, out_valid;
  logic [127:0] data_in, key_in, data_out;
  logic         v_hist [$];
  logic [127:0] e_hist [$];
  int checks = 0, failures = 0;
  aes_hdl dut (.clk, .rst_n, .in_valid, .data_in, .key_in, .out_valid, .data_out);
  always #5 clk = ~clk;
  initial begin
    #(10 * (N + 100)) failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst_n = 0; in_valid = 0; data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if (out_valid !== v_hist[n-LAT]) failures++;
        if (v_hist[n-LAT]) begin
          checks++;
          if (data_out !== e_hist[n-LAT]) begin
            failures++;
            $display("block %0d: got %h expected %h", n-LAT, data_out, e_hist[n-LAT]);
          end
        end
      end
      in_valid = (n < N) && (n == 0 || ($urandom % 4) != 0);
      if (n == 0) begin
        data_in = 128'h00112233445566778899aabbccddeeff;
        key_in  = 128'h000102030405060708090a0b0c0d0e0f;
      end else begin
        data_in = rand128(); key_in = rand128();
      end
      v_hist.push_back(in_valid);
      e_hist.push_back((n == 0) ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a : ref_encrypt(data_in, key_in, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
