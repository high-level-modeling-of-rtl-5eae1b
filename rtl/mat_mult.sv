// mat_mult: one column of AES MixColumns in QCA, eight clocks of delay.
// Inputs in1..in4 are the column's bytes from row 0 to row 3; output row r
// is 2*in(r) ^ 3*in(r+1) ^ in(r+2) ^ in(r+3), indices modulo 4, i.e. the
// column multiplied by the fixed circulant matrix [2 3 1 1]. Each output
// row is one mat_mult_row (a multiply-by-2, a multiply-by-3, XOR2s and
// aligning wires); the document names the multipliers and the XOR and the
// eight-clock delay, the exact arrangement is this model's.
module mat_mult (
  input  logic       clk0,
  input  logic       clk1,
  input  logic       clk2,
  input  logic       clk3,
  input  logic       clr_n,
  input  logic [7:0] in1,
  input  logic [7:0] in2,
  input  logic [7:0] in3,
  input  logic [7:0] in4,
  output logic [7:0] out1,
  output logic [7:0] out2,
  output logic [7:0] out3,
  output logic [7:0] out4
);
  mat_mult_row u_r0 (.clk0, .clk1, .clk2, .clk3, .clr_n, .a(in1), .b(in2), .c(in3), .d(in4), .out(out1));
  mat_mult_row u_r1 (.clk0, .clk1, .clk2, .clk3, .clr_n, .a(in2), .b(in3), .c(in4), .d(in1), .out(out2));
  mat_mult_row u_r2 (.clk0, .clk1, .clk2, .clk3, .clr_n, .a(in3), .b(in4), .c(in1), .d(in2), .out(out3));
  mat_mult_row u_r3 (.clk0, .clk1, .clk2, .clk3, .clr_n, .a(in4), .b(in1), .c(in2), .d(in3), .out(out4));
endmodule
