// wire_2clock_8: an 8-bit QCA wire two clocks long (two qca_wire per bit).
// Used beside mult_2x in mult_3x so that both XOR operands arrive together.
module wire_2clock_8 (
  input  logic       clk0,
  input  logic       clk1,
  input  logic       clk2,
  input  logic       clk3,
  input  logic       clr_n,
  input  logic [7:0] in,
  output logic [7:0] out
);
  qca_delay_line #(.WIDTH(8), .CLOCKS(2)) u_line (.clk0, .clk1, .clk2, .clk3, .clr_n, .in, .out);
endmodule
