// qca_wire: a QCA binary wire crossing the four clock zones, i.e. one clock
// of delay; WIDTH wires side by side. Four zone_latch stages in series, on
// clk0, clk1, clk2 and clk3. The input is captured when clk0 falls; the
// output takes the value when clk3 rises and keeps it for one clock
// period. clr_n (active low) clears all four stages.
module qca_wire #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk0,
  input  logic             clk1,
  input  logic             clk2,
  input  logic             clk3,
  input  logic             clr_n,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  logic [WIDTH-1:0] z0, z1, z2;
  zone_latch #(.WIDTH(WIDTH)) u_z0 (.clk(clk0), .clr_n, .in(in), .out(z0));
  zone_latch #(.WIDTH(WIDTH)) u_z1 (.clk(clk1), .clr_n, .in(z0), .out(z1));
  zone_latch #(.WIDTH(WIDTH)) u_z2 (.clk(clk2), .clr_n, .in(z1), .out(z2));
  zone_latch #(.WIDTH(WIDTH)) u_z3 (.clk(clk3), .clr_n, .in(z2), .out(out));
endmodule
