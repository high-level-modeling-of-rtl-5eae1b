// qca_clock_gen: behavioural model of the four-phase QCA clock (testbench
// only). Four 50%-duty square waves of period PERIOD, each a quarter period
// (90 degrees) after the previous one: clk0 is high in [0, P/2), clk1 in
// [P/4, 3P/4), clk2 in [P/2, P), clk3 in [3P/4, 5P/4).
module qca_clock_gen #(
  parameter int unsigned QUARTER = 10
) (
  output logic clk0,
  output logic clk1,
  output logic clk2,
  output logic clk3
);
  initial begin
    clk0 = 1'b0; clk1 = 1'b0; clk2 = 1'b1; clk3 = 1'b1;
    forever begin
      #(QUARTER) clk0 = 1'b1; clk2 = 1'b0;
      #(QUARTER) clk1 = 1'b1; clk3 = 1'b0;
      #(QUARTER) clk2 = 1'b1; clk0 = 1'b0;
      #(QUARTER) clk3 = 1'b1; clk1 = 1'b0;
    end
  end
endmodule
