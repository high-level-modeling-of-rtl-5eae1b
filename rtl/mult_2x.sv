// mult_2x: multiply a byte by 2 in GF(2^8) modulo x^8+x^4+x^3+x+1 (the AES
// "xtime"), two clocks of delay. The product is the input shifted left by
// one, with bit 7 folded back into bits 0, 1, 3 and 4. Bits 1, 3 and 4 need
// an XOR with bit 7 (xor2, two clocks); the other five output bits are
// copies of one input bit and go through a two-clock wire so that all
// eight bits leave together. The two-clock latency is what the multiply-
// by-3 schematic implies; the gate arrangement is this model's own.
module mult_2x (
  input  logic       clk0,
  input  logic       clk1,
  input  logic       clk2,
  input  logic       clk3,
  input  logic       clr_n,
  input  logic [7:0] in,
  output logic [7:0] out
);
  logic [4:0] plain_in, plain_out;
  // out[0]=in[7], out[2]=in[1], out[5]=in[4], out[6]=in[5], out[7]=in[6]
  assign plain_in = {in[6], in[5], in[4], in[1], in[7]};
  qca_delay_line #(.WIDTH(5), .CLOCKS(2)) u_plain (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                                   .in(plain_in), .out(plain_out));
  assign {out[7], out[6], out[5], out[2], out[0]} = plain_out;

  xor2 #(.WIDTH(3)) u_x (.clk0, .clk1, .clk2, .clk3, .clr_n,
                         .a_in({in[3], in[2], in[0]}), .b_in({3{in[7]}}),
                         .out({out[4], out[3], out[1]}));
endmodule
