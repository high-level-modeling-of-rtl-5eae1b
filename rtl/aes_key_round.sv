// aes_key_round: one step of the AES-128 key schedule (FIPS-197), purely
// combinational. From round key i-1 and the round constant it forms
// round key i: w0' = w0 ^ SubWord(RotWord(w3)) ^ {rcon,0,0,0},
// w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. The words are the four
// 32-bit columns, w0 in bits [127:96].
module aes_key_round (
  input  logic [127:0] key_in,
  input  logic [7:0]   rcon,
  output logic [127:0] key_out
);
  logic [31:0] w [4];
  logic [31:0] n [4];
  logic [31:0] t;
  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127-32*i -: 32];
    // RotWord then SubWord
    t = {aes_pkg::sbox(w[3][23:16]), aes_pkg::sbox(w[3][15:8]),
         aes_pkg::sbox(w[3][7:0]),   aes_pkg::sbox(w[3][31:24])};
    n[0] = w[0] ^ t ^ {rcon, 24'h0};
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ n[i-1];
    key_out = {n[0], n[1], n[2], n[3]};
  end
endmodule
