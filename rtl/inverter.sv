// inverter: QCA inverter model, combinational NOT, WIDTH bits side by side.
module inverter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  assign out = ~in;
endmodule
