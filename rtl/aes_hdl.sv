// aes_hdl: conventional synchronous RTL implementation of AES-128
// encryption, fully unrolled with one register stage per round, so a block
// leaves 10 clocks after it enters (NR clocks in general) and one block can
// enter every clock (128 bits per clock).
// Stage r (1..NR) holds the state after round r and round key r. Stage 1
// also does the initial AddRoundKey. The key schedule runs beside the data
// (aes_key_round per stage), so every block may carry its own key.
// Interface: in_valid/data_in/key_in are sampled on the rising clk edge;
// out_valid/data_out appear NR edges later. rst_n is an asynchronous,
// active-low reset of the valid flags. The unrolled structure and the
// ten-clock latency follow the document; the valid flags, the reset and
// the per-stage key schedule are this design's own choices.
module aes_hdl #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [127:0] data_in,
  input  logic [127:0] key_in,
  output logic         out_valid,
  output logic [127:0] data_out
);
  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                       8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  logic [127:0] state_q [NR+1];
  logic [127:0] key_q   [NR+1];
  logic         valid_q [NR+1];

  // stage 0 is the unregistered input
  assign state_q[0] = data_in ^ key_in;
  assign key_q[0]   = key_in;
  assign valid_q[0] = in_valid;

  for (genvar r = 1; r <= NR; r++) begin : g_stage
    logic [127:0] key_next, sub, shifted, mixed, state_next;
    aes_key_round u_key (.key_in(key_q[r-1]), .rcon(RCON[(r-1) % 10]), .key_out(key_next));
    always_comb begin
      for (int i = 0; i < 16; i++) sub[127-8*i -: 8] = aes_pkg::sbox(state_q[r-1][127-8*i -: 8]);
    end
    shift_row u_shift (.data_in(sub), .data_out(shifted));
    always_comb begin
      for (int c = 0; c < 4; c++) begin
        for (int row = 0; row < 4; row++) begin
          mixed[127-32*c-8*row -: 8] =
              aes_pkg::gf_mul(8'h02, shifted[127-32*c-8*row         -: 8]) ^
              aes_pkg::gf_mul(8'h03, shifted[127-32*c-8*((row+1)%4) -: 8]) ^
              shifted[127-32*c-8*((row+2)%4) -: 8] ^
              shifted[127-32*c-8*((row+3)%4) -: 8];
        end
      end
      state_next = ((r == NR) ? shifted : mixed) ^ key_next;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) valid_q[r] <= 1'b0;
      else        valid_q[r] <= valid_q[r-1];
    end
    always_ff @(posedge clk) begin
      state_q[r] <= state_next;
      key_q[r]   <= key_next;
    end
  end

  assign out_valid = valid_q[NR];
  assign data_out  = state_q[NR];
endmodule
