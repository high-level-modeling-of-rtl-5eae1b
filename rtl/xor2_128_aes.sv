// xor2_128_aes: 128 xor2 gates side by side, the AddRoundKey step of the QCA
// AES; out = a_in ^ b_in two clocks later.
module xor2_128_aes (
  input  logic         clk0,
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         clr_n,
  input  logic [127:0] a_in,
  input  logic [127:0] b_in,
  output logic [127:0] out
);
  xor2 #(.WIDTH(128)) u_xor (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in, .b_in, .out);
endmodule
