// mix_column: AES MixColumns over the 128-bit state, eight clocks of delay.
// The state is column-major as in FIPS-197: bits [127:96] are column 0
// (row 0 in [127:120]), bits [31:0] column 3. Each column goes to its own
// mat_mult instance and its result returns to the same bit positions.
module mix_column (
  input  logic         clk0,
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         clr_n,
  input  logic [127:0] data_in,
  output logic [127:0] data_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    localparam int unsigned HI = 127 - 32*c;
    mat_mult mat_mult_ins (
      .clk0, .clk1, .clk2, .clk3, .clr_n,
      .in1 (data_in[HI    -: 8]), .in2 (data_in[HI-8  -: 8]),
      .in3 (data_in[HI-16 -: 8]), .in4 (data_in[HI-24 -: 8]),
      .out1(data_out[HI    -: 8]), .out2(data_out[HI-8  -: 8]),
      .out3(data_out[HI-16 -: 8]), .out4(data_out[HI-24 -: 8]));
  end
endmodule
