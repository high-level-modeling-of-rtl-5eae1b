// majority: QCA three-input majority gate, combinational, WIDTH gates side
// by side. out = 1 where at least two inputs are 1. With one input tied to
// 0 it is a two-input AND, with one input tied to 1 a two-input OR.
module majority #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  output logic [WIDTH-1:0] out
);
  assign out = (in1 & in2) | (in1 & in3) | (in2 & in3);
endmodule
