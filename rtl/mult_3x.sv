// mult_3x: multiply a byte by 3 in GF(2^8), four clocks of delay.
// 3*x = 2*x ^ x: mult_2x (two clocks) in parallel with a two-clock wire,
// joined by an 8-bit XOR2 (two clocks), as in the design's schematic.
module mult_3x (
  input  logic       clk0,
  input  logic       clk1,
  input  logic       clk2,
  input  logic       clk3,
  input  logic       clr_n,
  input  logic [7:0] in,
  output logic [7:0] out
);
  logic [7:0] x2, x1;
  mult_2x       mult_2x_ins (.clk0, .clk1, .clk2, .clk3, .clr_n, .in, .out(x2));
  wire_2clock_8 wire_ins    (.clk0, .clk1, .clk2, .clk3, .clr_n, .in, .out(x1));
  xor2_8        xor_ins     (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in(x2), .b_in(x1), .out);
endmodule
