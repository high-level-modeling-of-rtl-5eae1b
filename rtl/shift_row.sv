// shift_row: AES ShiftRows, zero delay (a fixed crossing of wires).
// The 128-bit state is column-major: byte k = 4*column + row sits in bits
// [127-8k -: 8]. Row r is rotated left by r positions, so output byte
// (row r, column c) is input byte (row r, column (c+r) mod 4). In the QCA
// layout this is routing only, which is why the round delay of 26 clocks
// counts nothing for it.
module shift_row (
  input  logic [127:0] data_in,
  output logic [127:0] data_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign data_out[127 - 8*(4*c + r) -: 8] = data_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
    end
  end
endmodule
