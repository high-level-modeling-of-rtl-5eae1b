// xor2: QCA two-input XOR, two clocks of delay.
// out = a_in ^ b_in, sampled when clk0 falls and presented when clk3 rises
// two periods later. Built as in the schematic of the design from three
// majority gates, one inverter and sixteen zone latches:
//   xor = AND( OR(a,b), NOT(AND(a,b)) ).
// Zones 0..2 of the first clock fan the inputs out to the AND and OR gates,
// zone 3 latches AND and OR, the inverter follows the AND, zones 0 and 1 of
// the second clock carry both terms to the final AND, zones 2 and 3 carry the
// result out. WIDTH gates sit side by side. The zone each latch sits in is this model's choice.
module xor2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic clk0,
  input  logic clk1,
  input  logic clk2,
  input  logic clk3,
  input  logic clr_n,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  output logic [WIDTH-1:0] out
);
  logic [WIDTH-1:0] a0, b0, a1, b1, a2a, b2a, a2o, b2o;
  logic [WIDTH-1:0] and_ab, or_ab, and_z3, or_z3, nand_ab;
  logic [WIDTH-1:0] nand_z0, or_z0, nand_z1, or_z1, x, x_z2;

  // first clock: zones 0, 1, 2 carry and fan out the inputs
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins1  (.clk(clk0), .clr_n, .in(a_in), .out(a0));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins2  (.clk(clk0), .clr_n, .in(b_in), .out(b0));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins3  (.clk(clk1), .clr_n, .in(a0),   .out(a1));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins8  (.clk(clk1), .clr_n, .in(b0),   .out(b1));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins4  (.clk(clk2), .clr_n, .in(a1),   .out(a2a));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins5  (.clk(clk2), .clr_n, .in(b1),   .out(b2a));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins7  (.clk(clk2), .clr_n, .in(a1),   .out(a2o));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins9  (.clk(clk2), .clr_n, .in(b1),   .out(b2o));

  majority   #(.WIDTH(WIDTH)) majority_ins2    (.in1('0), .in2(a2a), .in3(b2a), .out(and_ab));
  majority   #(.WIDTH(WIDTH)) majority_ins1    (.in1('1), .in2(a2o), .in3(b2o), .out(or_ab));

  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins6  (.clk(clk3), .clr_n, .in(and_ab), .out(and_z3));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins10 (.clk(clk3), .clr_n, .in(or_ab),  .out(or_z3));

  inverter   #(.WIDTH(WIDTH)) inverter_ins1    (.in(and_z3), .out(nand_ab));

  // second clock: zones 0, 1 carry NAND and OR to the final AND
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins12 (.clk(clk0), .clr_n, .in(nand_ab), .out(nand_z0));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins11 (.clk(clk0), .clr_n, .in(or_z3),   .out(or_z0));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins14 (.clk(clk1), .clr_n, .in(nand_z0), .out(nand_z1));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins13 (.clk(clk1), .clr_n, .in(or_z0),   .out(or_z1));

  majority   #(.WIDTH(WIDTH)) majority_ins3    (.in1('0), .in2(or_z1), .in3(nand_z1), .out(x));

  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins15 (.clk(clk2), .clr_n, .in(x),    .out(x_z2));
  zone_latch #(.WIDTH(WIDTH)) zone_latch_ins16 (.clk(clk3), .clr_n, .in(x_z2), .out(out));
endmodule
