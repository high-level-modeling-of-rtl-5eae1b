// aes_qca_tb: end-to-end test of the QCA AES model, shortened to NR = 3
// rounds (two full rounds and the final round) so that it builds and runs
// in a few minutes. Round keys come from the reference key schedule of the
// FIPS-197 example key 000102..0f and are held for the whole test. One
// plaintext enters every clock: first the example's 00112233..ff, then
// random blocks. Each output is compared with the reference exactly
// 2 + 26*(NR-1) + 18 clocks after its input, which checks the latency; the
// output must be 0 while clr_n is low.
module aes_qca_tb;
  import aes_ref_pkg::*;
  localparam int unsigned NR = 3;
  localparam int unsigned D  = 2 + 26*(NR-1) + 18;
  localparam int unsigned N = 8;
  logic clk0, clk1, clk2, clk3, clr_n;
  logic [127:0] data_in, data_out;
  logic [127:0] round_key [NR+1];
  logic [127:0] expected [$];
  int checks = 0, failures = 0;

  qca_clock_gen u_clk (.clk0, .clk1, .clk2, .clk3);
  aes_qca #(.NR(NR)) dut (.clk0, .clk1, .clk2, .clk3, .clr_n, .data_in, .round_key, .data_out);

  initial begin
    #(40 * (N + D + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 1'b0;
    data_in = '0;
    round_key[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int r = 1; r <= NR; r++) round_key[r] = ref_next_key(round_key[r-1], r);
    repeat (3) @(negedge clk0);
    checks++;
    if (data_out != '0) failures++;
    @(posedge clk3);
    clr_n = 1'b1;
    for (int n = 0; n < N + D; n++) begin
      @(posedge clk3);
      data_in = (n == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
      expected.push_back(ref_encrypt(data_in, round_key[0], NR));
      @(negedge clk0);
      if (n >= D) begin
        checks++;
        if (data_out !== expected[n-D]) begin
          failures++;
          $display("block %0d: got %h expected %h", n-D, data_out, expected[n-D]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
