// mux16_1: QCA 16-to-1 multiplexer, eight clocks of delay; WIDTH of them
// side by side, each with its own select. out[w] = data[sel[w]][w], sampled
// together with data. A tree of fifteen mux2_1 per lane in four levels
// (8, 4, 2, 1); level L uses select bit L-1 and each level is followed by
// a one-clock wire, so a level costs two clocks. Select bits 1, 2 and 3 are
// delayed 2, 4 and 6 clocks by wires to meet their level (each mux2_1 of a
// lane gets its own delayed select). The eight-clock total is
// what the 16-clock, two-level 256-to-1 multiplexer of the S-box requires;
// the wire placement is this model's choice.
module mux16_1 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic                   clk0,
  input  logic                   clk1,
  input  logic                   clk2,
  input  logic                   clk3,
  input  logic                   clr_n,
  input  logic [15:0][WIDTH-1:0] data,
  input  logic [WIDTH-1:0][3:0]  sel,
  output logic [WIDTH-1:0]       out
);
  // lvl[L] holds the 16 >> L results of level L, entry-major
  logic [15:0][WIDTH-1:0] lvl [5];
  logic [3:0][WIDTH-1:0]  sel_d;   // sel_d[L][w]: select bit L of lane w, delayed 2L clocks
  assign lvl[0]   = data;
  for (genvar w = 0; w < WIDTH; w++) begin : g_sel0
    assign sel_d[0][w] = sel[w][0];
  end

  for (genvar L = 1; L < 4; L++) begin : g_sel
    logic [WIDTH-1:0] bit_l;
    for (genvar w = 0; w < WIDTH; w++) begin : g_lane
      assign bit_l[w] = sel[w][L];
    end
    qca_delay_line #(.WIDTH(WIDTH), .CLOCKS(2*L)) u_sel (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                                          .in(bit_l), .out(sel_d[L]));
  end

  for (genvar L = 1; L <= 4; L++) begin : g_lvl
    localparam int unsigned N = 16 >> L;
    logic [N-1:0][WIDTH-1:0] a, b, m;
    for (genvar i = 0; i < N; i++) begin : g_pair
      assign a[i] = lvl[L-1][2*i];
      assign b[i] = lvl[L-1][2*i+1];
    end
    mux2_1 #(.WIDTH(N*WIDTH)) u_mux (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                     .a_in(a), .b_in(b), .sel({N{sel_d[L-1]}}), .out(m));
    qca_wire #(.WIDTH(N*WIDTH)) u_wire (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                        .in(m), .out(lvl[L][N-1:0]));
    if (N < 16) begin : g_pad
      assign lvl[L][15:N] = '0;
    end
  end
  assign out = lvl[4][0];
endmodule
