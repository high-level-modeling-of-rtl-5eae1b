// aes_final_round: the last AES round in QCA, without MixColumns,
// 18 clocks of delay: sbox_128 (16) -> shift_row (0) -> xor2_128_aes (2).
// key must be held stable while data flows.
module aes_final_round (
  input  logic         clk0,
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         clr_n,
  input  logic [127:0] data_in,
  input  logic [127:0] key,
  output logic [127:0] data_out
);
  logic [127:0] sub, shifted;
  sbox_128     sbox_ins      (.clk0, .clk1, .clk2, .clk3, .clr_n, .data_in, .data_out(sub));
  shift_row    shift_row_ins (.data_in(sub), .data_out(shifted));
  xor2_128_aes xor_ins       (.clk0, .clk1, .clk2, .clk3, .clr_n, .a_in(shifted), .b_in(key), .out(data_out));
endmodule
