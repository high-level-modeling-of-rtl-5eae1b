// mat_mult_row: one output byte of the MixColumns matrix product,
// out = 2*a ^ 3*b ^ c ^ d in GF(2^8), eight clocks of delay.
//   clock 2: 2*a ready (mult_2x); c^d ready (xor2_8)
//   clock 4: 3*b ready (mult_3x); 2*a delayed to meet it
//   clock 6: 2*a ^ 3*b ready; c^d delayed four clocks to meet it
//   clock 8: the sum of all four terms
module mat_mult_row (
  input  logic       clk0,
  input  logic       clk1,
  input  logic       clk2,
  input  logic       clk3,
  input  logic       clr_n,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] c,
  input  logic [7:0] d,
  output logic [7:0] out
);
  logic [7:0] a2, a2_d, b3, ab, cd, cd_d2, cd_d4;
  mult_2x       u_m2   (.clk0, .clk1, .clk2, .clk3, .clr_n, .in(a), .out(a2));
  wire_2clock_8 u_a2_d (.clk0, .clk1, .clk2, .clk3, .clr_n, .in(a2), .out(a2_d));
  mult_3x       u_m3   (.clk0, .clk1, .clk2, .clk3, .clr_n, .in(b), .out(b3));
  xor2_8        u_ab   (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in(a2_d), .b_in(b3), .out(ab));
  xor2_8        u_cd   (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in(c), .b_in(d), .out(cd));
  wire_2clock_8 u_cd_1 (.clk0, .clk1, .clk2, .clk3, .clr_n, .in(cd), .out(cd_d2));
  wire_2clock_8 u_cd_2 (.clk0, .clk1, .clk2, .clk3, .clr_n, .in(cd_d2), .out(cd_d4));
  xor2_8        u_sum  (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in(ab), .b_in(cd_d4), .out);
endmodule
