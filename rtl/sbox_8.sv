// sbox_8: AES S-box for one byte in QCA, LUT-based, sixteen clocks of delay;
// LANES such S-boxes side by side (default 1), each with its own input.
// Eight mux256_1 instances (bit0_ins .. bit7_ins, as in the design's
// schematic) take sb_in as their select; the table inputs of instance k
// are tied to bit k of every S-box entry, so instance k returns bit k of
// S(sb_in). The table is computed in aes_pkg (once, as a package constant)
// from the S-box definition rather than typed in.
module sbox_8 #(
  parameter int unsigned LANES = 1
) (
  input  logic                  clk0,
  input  logic                  clk1,
  input  logic                  clk2,
  input  logic                  clk3,
  input  logic                  clr_n,
  input  logic [LANES-1:0][7:0] sb_in,
  output logic [LANES-1:0][7:0] sb_out
);
  for (genvar k = 0; k < 8; k++) begin : g_bit
    logic [LANES-1:0] bit_k;
    mux256_1 #(.LANES(LANES)) bit_ins (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                       .data({LANES{aes_pkg::SBOX_COLUMNS[k]}}),
                                       .sel(sb_in), .out(bit_k));
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      assign sb_out[l][k] = bit_k[l];
    end
  end
endmodule
