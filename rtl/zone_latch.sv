// zone_latch: one QCA clock zone modelled as level-sensitive latches, WIDTH
// of them side by side (one per bit, all on the same zone clock).
// While clk is 1 the input flows to the output; while clk is 0 the output
// holds. While clr_n is 0 the output is forced to 0, whatever clk does.
// A QCA clock zone passes its value on while its clock phase is high and
// keeps it while the phase is low; this is the storage element of every
// other module in the QCA model. Priority of clear over clk is this
// model's choice. The latches are intentional: they are the model.
module zone_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             clr_n,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  always_latch begin
    if (!clr_n)   out = '0;
    else if (clk) out = in;
  end
endmodule
