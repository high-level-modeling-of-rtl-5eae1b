// aes_round_tb: self-checking testbench for aes_round.
// Drives a new input every clock (when clk3 rises, while the zone-0 latches
// are closed), and at every falling edge of clk0 compares the output with
// the reference value of the input sampled exactly 26 clocks earlier, which
// checks the 26-clock latency as well as the function. Also checks that the
// output is 0 while clr_n is low. Reference values come from aes_ref_pkg.
module aes_round_tb;
  import aes_ref_pkg::*;
  localparam int unsigned D = 26;
  localparam int unsigned N = 24;
  logic clk0, clk1, clk2, clk3, clr_n;
  int checks = 0, failures = 0;
  logic [127:0] data_in, key, data_out;
  logic [127:0] expected [$];

  qca_clock_gen u_clk (.clk0, .clk1, .clk2, .clk3);
  aes_round dut (.clk0, .clk1, .clk2, .clk3, .clr_n, .data_in, .key, .data_out);

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
    // round key 1 of the FIPS-197 AES-128 example, held for the whole test
    key = 128'hd6aa74fdd2af72fadaa678f1d6ab76fe;
    repeat (3) @(negedge clk0);
    checks++;
    if (data_out != '0) begin failures++; $display("output not cleared"); end
    @(posedge clk3);
    clr_n = 1'b1;
    for (int n = 0; n < N + D; n++) begin
      @(posedge clk3);
      // first block: the example's state after the initial key addition
      data_in = (n == 0) ? 128'h00102030405060708090a0b0c0d0e0f0 : rand128();
      expected.push_back((n == 0) ? 128'h89d810e8855ace682d1843d8cb128fe4 : ref_round(data_in, key));
      @(negedge clk0);
      if (n >= D) begin
        checks++;
        if (data_out !== expected[n-D]) begin
          failures++;
          if (failures < 5) $display("mismatch at sample %0d: got %h expected %h", n-D, data_out, expected[n-D]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
