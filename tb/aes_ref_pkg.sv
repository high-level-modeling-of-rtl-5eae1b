// aes_ref_pkg: reference model of AES-128 encryption for the testbenches,
// written independently of the RTL: the S-box comes from exponent and
// logarithm tables over the generator 3 of GF(2^8)* (S(0) handled apart),
// multiplication is shift-and-add. State layout is FIPS-197 column-major,
// byte 0 in bits [127:120].
package aes_ref_pkg;

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0, x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] expt [256];
    logic [7:0] lg   [256];
    logic [7:0] inv, s;
    logic [7:0] p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      expt[i] = p;
      lg[p]   = 8'(i);
      p = ref_mul(p, 8'h03);
    end
    inv = (a == 0) ? 8'h00 : expt[(255 - int'(lg[a])) % 255];
    s = 8'h63;
    for (int b = 0; b < 8; b++)
      s[b] = s[b] ^ inv[b] ^ inv[(b+4)%8] ^ inv[(b+5)%8] ^ inv[(b+6)%8] ^ inv[(b+7)%8];
    return s;
  endfunction

  function automatic logic [7:0] get_b(input logic [127:0] st, input int k);
    return st[127-8*k -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] st);
    logic [127:0] o;
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = ref_sbox(get_b(st, k));
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] st);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = get_b(st, 4*((c+r)%4) + r);
    return o;
  endfunction

  function automatic logic [31:0] ref_mix_one(input logic [31:0] col);
    logic [7:0] a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    return {ref_mul(a0,2)^ref_mul(a1,3)^a2^a3, a0^ref_mul(a1,2)^ref_mul(a2,3)^a3,
            a0^a1^ref_mul(a2,2)^ref_mul(a3,3), ref_mul(a0,3)^a1^a2^ref_mul(a3,2)};
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] st);
    return {ref_mix_one(st[127:96]), ref_mix_one(st[95:64]), ref_mix_one(st[63:32]), ref_mix_one(st[31:0])};
  endfunction

  function automatic logic [127:0] ref_round(input logic [127:0] st, input logic [127:0] k);
    return ref_mix_columns(ref_shift_rows(ref_sub_bytes(st))) ^ k;
  endfunction

  function automatic logic [127:0] ref_final_round(input logic [127:0] st, input logic [127:0] k);
    return ref_shift_rows(ref_sub_bytes(st)) ^ k;
  endfunction

  function automatic logic [127:0] ref_next_key(input logic [127:0] k, input int round);
    logic [7:0]  rc = 8'h01;
    logic [31:0] w0 = k[127:96], w1 = k[95:64], w2 = k[63:32], w3 = k[31:0], t;
    for (int i = 1; i < round; i++) rc = ref_mul(rc, 8'h02);
    t = {ref_sbox(w3[23:16]) ^ rc, ref_sbox(w3[15:8]), ref_sbox(w3[7:0]), ref_sbox(w3[31:24])};
    w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  // encryption with nr rounds, round keys from the standard schedule
  function automatic logic [127:0] ref_encrypt(input logic [127:0] pt, input logic [127:0] key, input int nr);
    logic [127:0] st = pt ^ key, k = key;
    for (int r = 1; r <= nr; r++) begin
      k  = ref_next_key(k, r);
      st = (r == nr) ? ref_final_round(st, k) : ref_round(st, k);
    end
    return st;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
