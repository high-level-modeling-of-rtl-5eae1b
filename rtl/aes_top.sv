// aes_top: the two AES-128 encryption implementations of this design side
// by side; they share nothing.
//  * qca_*: the quantum-dot cellular automata model (aes_qca), four-phase
//    zone clocks, 254 clocks latency, one block per clock, round keys
//    supplied from outside and held stable.
//  * hdl_*: the conventional synchronous pipeline (aes_hdl), one clock,
//    10 clocks latency, one block per clock, key expanded inside.
// NR sets the number of rounds of both; with NR below 10 they compute a
// shortened AES (useful only to keep simulations small). Latencies are
// 2 + 26*(NR-1) + 18 QCA clocks and NR system clocks.
module aes_top #(
  parameter int unsigned NR = aes_pkg::NR   // rounds of both ciphers (10 for AES-128)
) (
  input  logic         qca_clk0,
  input  logic         qca_clk1,
  input  logic         qca_clk2,
  input  logic         qca_clk3,
  input  logic         qca_clr_n,
  input  logic [127:0] qca_data_in,
  input  logic [127:0] qca_round_key [NR+1],
  output logic [127:0] qca_data_out,

  input  logic         hdl_clk,
  input  logic         hdl_rst_n,
  input  logic         hdl_in_valid,
  input  logic [127:0] hdl_data_in,
  input  logic [127:0] hdl_key_in,
  output logic         hdl_out_valid,
  output logic [127:0] hdl_data_out
);
  aes_qca #(.NR(NR)) u_qca (.clk0(qca_clk0), .clk1(qca_clk1), .clk2(qca_clk2), .clk3(qca_clk3),
                 .clr_n(qca_clr_n), .data_in(qca_data_in), .round_key(qca_round_key),
                 .data_out(qca_data_out));
  aes_hdl #(.NR(NR)) u_hdl (.clk(hdl_clk), .rst_n(hdl_rst_n), .in_valid(hdl_in_valid),
                 .data_in(hdl_data_in), .key_in(hdl_key_in),
                 .out_valid(hdl_out_valid), .data_out(hdl_data_out));
endmodule
