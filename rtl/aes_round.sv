// aes_round: one full AES round in QCA, 26 clocks of delay:
//   sbox_128 (16) -> shift_row (0) -> mix_column (8) -> xor2_128_aes (2).
// key is XORed in without delay and must be held stable while data flows.
// A new state may enter every clock; each leaves 26 clocks later.
module aes_round (
  input  logic         clk0,
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         clr_n,
  input  logic [127:0] data_in,
  input  logic [127:0] key,
  output logic [127:0] data_out
);
  logic [127:0] sub, shifted, mixed;
  sbox_128     sbox_ins       (.clk0, .clk1, .clk2, .clk3, .clr_n, .data_in, .data_out(sub));
  shift_row    shift_row_ins  (.data_in(sub), .data_out(shifted));
  mix_column   mix_column_ins (.clk0, .clk1, .clk2, .clk3, .clr_n, .data_in(shifted), .data_out(mixed));
  xor2_128_aes xor_ins        (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in(mixed), .b_in(key), .out(data_out));
endmodule
