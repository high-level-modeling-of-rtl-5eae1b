// wire_2clock_8_tb: self-checking testbench for wire_2clock_8.
// Drives a new input every clock (when clk3 rises, while the zone-0 latches
// are closed), and at every falling edge of clk0 compares the output with
// the reference value of the input sampled exactly 2 clocks earlier, which
// checks the 2-clock latency as well as the function. Also checks that the
// output is 0 while clr_n is low. Reference values come from aes_ref_pkg.
module wire_2clock_8_tb;
  import aes_ref_pkg::*;
  localparam int unsigned D = 2;
  localparam int unsigned N = 64;
  logic clk0, clk1, clk2, clk3, clr_n;
  int checks = 0, failures = 0;
  logic [7:0] in, out;
  logic [7:0] expected [$];

  qca_clock_gen u_clk (.clk0, .clk1, .clk2, .clk3);
  wire_2clock_8 dut (.clk0, .clk1, .clk2, .clk3, .clr_n, .in, .out);

  initial begin
    #(40 * (N + D + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 1'b0;
    in = '0;
    repeat (3) @(negedge clk0);
    checks++;
    if (out != '0) begin failures++; $display("output not cleared"); end
    @(posedge clk3);
    clr_n = 1'b1;
    for (int n = 0; n < N + D; n++) begin
      @(posedge clk3);
      in = 8'($urandom);
      expected.push_back(in);
      @(negedge clk0);
      if (n >= D) begin
        checks++;
        if (out !== expected[n-D]) begin
          failures++;
          if (failures < 5) $display("mismatch at sample %0d: got %h expected %h", n-D, out, expected[n-D]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
