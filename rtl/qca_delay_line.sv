// qca_delay_line: WIDTH parallel QCA wires, each CLOCKS qca_wire segments
// long, so the output repeats the input CLOCKS clocks later. Used to keep
// select bits and data words aligned with the latency of the logic next to
// them. CLOCKS = 0 is a plain connection.
module qca_delay_line #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned CLOCKS = 1
) (
  input  logic             clk0,
  input  logic             clk1,
  input  logic             clk2,
  input  logic             clk3,
  input  logic             clr_n,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  logic [WIDTH-1:0] tap [CLOCKS+1];
  assign tap[0] = in;
  for (genvar s = 0; s < CLOCKS; s++) begin : g_seg
    qca_wire #(.WIDTH(WIDTH)) u_wire (.clk0, .clk1, .clk2, .clk3, .clr_n,
                                      .in(tap[s]), .out(tap[s+1]));
  end
  assign out = tap[CLOCKS];
endmodule
