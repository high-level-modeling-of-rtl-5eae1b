// zone_latch_tb: checks the zone latch of a 4-bit width: transparent while
// clk is 1, holding while clk is 0, forced to 0 while clr_n is 0.
module zone_latch_tb;
  logic clk, clr_n;
  logic [3:0] in, out, held;
  int checks = 0, failures = 0;
  zone_latch #(.WIDTH(4)) dut (.clk, .clr_n, .in, .out);
  task automatic check(input logic [3:0] exp);
    #1 checks++;
    if (out !== exp) begin failures++; $display("got %h expected %h", out, exp); end
  endtask
  initial begin
    #10000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    clk = 1; clr_n = 0; in = 4'hf;
    check(4'h0);                           // clear wins over clk
    clr_n = 1;
    for (int i = 0; i < 50; i++) begin
      clk = 1; in = 4'($urandom); check(in);   // transparent
      held = in;
      clk = 0; in = ~in; check(held);          // holds
      in = 4'($urandom); check(held);
    end
    clr_n = 0; check(4'h0);                    // clear while closed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
