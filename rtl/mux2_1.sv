// mux2_1: QCA 2-to-1 multiplexer, one clock of delay.
// out = sel ? b_in : a_in, sampled when clk0 falls and presented when clk3
// rises. Built as in the schematic of the design: three majority gates,
// one inverter and seven zone latches. Zone 0 latches the three inputs; the
// inverted select and a_in meet in a majority gate with a 0 input (AND),
// select and b_in in another AND; zone 1 latches both products; a majority
// gate with a 1 input (OR) joins them; zones 2 and 3 carry the result out.
// Which select value picks which input, and which latch sits in which
// zone, are this model's choices.
module mux2_1 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic clk0,
  input  logic clk1,
  input  logic clk2,
  input  logic clk3,
  input  logic clr_n,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  input  logic [WIDTH-1:0] sel,
  output logic [WIDTH-1:0] out
);
  logic [WIDTH-1:0] a_z0, b_z0, s_z0, s_n, and_a, and_b, and_a_z1, and_b_z1, or_ab, or_z2;

  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins1 (.clk(clk0), .clr_n, .in(a_in), .out(a_z0));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins2 (.clk(clk0), .clr_n, .in(sel),  .out(s_z0));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins3 (.clk(clk0), .clr_n, .in(b_in), .out(b_z0));

  inverter   #(.WIDTH(WIDTH)) inverter_ins1   (.in(s_z0), .out(s_n));
  majority   #(.WIDTH(WIDTH)) majority_ins1   (.in1('0), .in2(a_z0), .in3(s_n),  .out(and_a));
  majority   #(.WIDTH(WIDTH)) majority_ins2   (.in1('0), .in2(b_z0), .in3(s_z0), .out(and_b));

  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins4 (.clk(clk1), .clr_n, .in(and_a), .out(and_a_z1));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins5 (.clk(clk1), .clr_n, .in(and_b), .out(and_b_z1));

  majority   #(.WIDTH(WIDTH)) majority_ins3   (.in1('1), .in2(and_a_z1), .in3(and_b_z1), .out(or_ab));

  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins6 (.clk(clk2), .clr_n, .in(or_ab), .out(or_z2));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins7 (.clk(clk3), .clr_n, .in(or_z2), .out(out));
endmodule
