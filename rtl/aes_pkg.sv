// aes_pkg: constants and elaboration-time functions shared by the AES
// models. The S-box table is not stored as a list of numbers; it is
// computed from its definition: the multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1 (0 maps to 0), followed by the affine map
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The functions also serve the conventional RTL implementation, where
// they become combinational logic.
package aes_pkg;

  localparam int unsigned NR = 10;   // rounds for a 128-bit key

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a = 0
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (((254 >> i) & 1) != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b;
    b = gf_inv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // the S-box truth table by output bit: SBOX_COLUMNS[k][i] is bit k of sbox(i)
  function automatic logic [7:0][255:0] sbox_columns();
    logic [7:0][255:0] cols;
    logic [7:0]        s;
    for (int i = 0; i < 256; i++) begin
      s = sbox(8'(i));
      for (int k = 0; k < 8; k++) cols[k][i] = s[k];
    end
    return cols;
  endfunction

  localparam logic [7:0][255:0] SBOX_COLUMNS = sbox_columns();

endpackage
