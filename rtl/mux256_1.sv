// mux256_1: QCA 256-to-1 multiplexer, sixteen clocks of delay; LANES of
// them side by side, each with its own table and select:
// out[l] = data[l][sel[l]].
// Each lane is seventeen 16-to-1 multiplexers: sixteen on sel[3:0] pick one
// bit each from a 16-bit slice of the table (written as one mux16_1 with
// sixteen lanes per lane of this module, lane j picking from
// data[16j+15:16j]), and a seventeenth picks among their outputs with
// sel[7:4], delayed eight clocks by wires to meet them. The table is meant
// to be constant (one S-box output bit per entry).
module mux256_1 #(
  parameter int unsigned LANES = 1
) (
  input  logic                    clk0,
  input  logic                    clk1,
  input  logic                    clk2,
  input  logic                    clk3,
  input  logic                    clr_n,
  input  logic [LANES-1:0][255:0] data,
  input  logic [LANES-1:0][7:0]   sel,
  output logic [LANES-1:0]        out
);
  // first level: lane (l, j) is multiplexer j of lane l
  logic [15:0][LANES-1:0][15:0]  slices;   // slices[i][l][j] = data[l][16j + i]
  logic [LANES-1:0][15:0][3:0]   sel_lo;
  logic [LANES-1:0][15:0]        first;
  logic [LANES-1:0][3:0]         sel_hi_in, sel_hi;
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar j = 0; j < 16; j++) begin : g_mux
      assign sel_lo[l][j] = sel[l][3:0];
      for (genvar i = 0; i < 16; i++) begin : g_entry
        assign slices[i][l][j] = data[l][16*j + i];
      end
    end
    assign sel_hi_in[l] = sel[l][7:4];
  end
  mux16_1 #(.WIDTH(16*LANES)) u_first (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                       .data(slices), .sel(sel_lo), .out(first));
  qca_delay_line #(.WIDTH(4*LANES), .CLOCKS(8)) u_sel_hi (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                                          .in(sel_hi_in), .out(sel_hi));
  // second level: lane l picks among first[l][15:0]
  logic [15:0][LANES-1:0] second_data;
  for (genvar i = 0; i < 16; i++) begin : g_second
    for (genvar l = 0; l < LANES; l++) begin : g_lane2
      assign second_data[i][l] = first[l][i];
    end
  end
  mux16_1 #(.WIDTH(LANES)) u_second (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                     .data(second_data), .sel(sel_hi), .out);
endmodule
