// sbox_128: AES SubBytes over the 128-bit state in QCA, sixteen clocks of
// delay: sixteen byte S-boxes, written as one sbox_8 with sixteen lanes
// (byte i of the state, bits [8i+7:8i], is lane i).
module sbox_128 (
  input  logic         clk0,
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         clr_n,
  input  logic [127:0] data_in,
  output logic [127:0] data_out
);
  sbox_8 #(.LANES(16)) u_sbox (.clk0, .clk1, .clk2, .clk3, .clr_n,
                               .sb_in(data_in), .sb_out(data_out));
endmodule
