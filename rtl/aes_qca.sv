// aes_qca: AES-128 encryption modelled at QCA cell-group level (zone
// latches, majority gates, inverters) and fully unrolled.
//   xor2_128_aes with round key 0 (2 clocks)
//   NR-1 aes_round (26 clocks each)
//   aes_final_round (18 clocks)
// For NR = 10 the latency is 2 + 9*26 + 18 = 254 clocks, and a new
// plaintext may enter every clock (128 bits per clock). Timing: data_in is
// sampled when clk0 falls; data_out changes when clk3 rises and holds for
// one clock. The key schedule is not part of this model: round_key[i] is
// round key i and must be held stable while blocks stream through.
// clr_n (active low) clears every latch.
module aes_qca #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic         clk0,
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         clr_n,
  input  logic [127:0] data_in,
  input  logic [127:0] round_key [NR+1],
  output logic [127:0] data_out
);
  logic [127:0] state [NR];

  xor2_128_aes xor_ins (.clk0, .clk1, .clk2, .clk3, .clr_n,
                        .a_in(data_in), .b_in(round_key[0]), .out(state[0]));

  for (genvar r = 1; r < NR; r++) begin : g_round
    aes_round round_ins (.clk0, .clk1, .clk2, .clk3, .clr_n,
                         .data_in(state[r-1]), .key(round_key[r]), .data_out(state[r]));
  end

  aes_final_round final_round_ins (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                   .data_in(state[NR-1]), .key(round_key[NR]), .data_out(data_out));
endmodule
