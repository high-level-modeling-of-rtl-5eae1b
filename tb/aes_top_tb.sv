// aes_top_tb: runs both implementations of aes_top end to end, with the
// number of rounds reduced to NR = 2 (one full round and the final round)
// to keep the QCA model small enough to simulate quickly. Both get the same
// stream of plaintexts under the FIPS-197 example key. Every ciphertext is
// checked against the reference, and so is the latency of each pipeline
// (2 + 26*(NR-1) + 18 QCA clocks, NR system clocks). It also counts how
// often each mechanism happened and fails if one never did: QCA clear
// (output held at 0), several blocks in flight in each pipeline at once,
// and bubbles (in_valid low) in the conventional pipeline.
module aes_top_tb;
  import aes_ref_pkg::*;
  localparam int unsigned NR = 2;
  localparam int unsigned DQ = 2 + 26*(NR-1) + 18;
  localparam int unsigned DH = NR;
  localparam int unsigned N  = 8;
  logic qca_clk0, qca_clk1, qca_clk2, qca_clk3, qca_clr_n;
  logic [127:0] qca_data_in, qca_data_out;
  logic [127:0] qca_round_key [NR+1];
  logic hdl_clk = 0, hdl_rst_n, hdl_in_valid, hdl_out_valid;
  logic [127:0] hdl_data_in, hdl_key_in, hdl_data_out;
  logic [127:0] key = 128'h000102030405060708090a0b0c0d0e0f;
  logic [127:0] pt [N];
  int checks = 0, failures = 0;
  int n_clear = 0, n_qca_inflight = 0, n_hdl_inflight = 0, n_bubble = 0;
  int qca_done = 0, hdl_done = 0;

  qca_clock_gen u_clk (.clk0(qca_clk0), .clk1(qca_clk1), .clk2(qca_clk2), .clk3(qca_clk3));
  always #5 hdl_clk = ~hdl_clk;

  aes_top #(.NR(NR)) dut (.*);

  initial begin
    #(40 * (N + DQ + 40));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt[0] = 128'h00112233445566778899aabbccddeeff;
    for (int i = 1; i < N; i++) pt[i] = rand128();
  end

  // QCA side: one block per clock, round keys held
  initial begin
    qca_clr_n = 1'b0;
    qca_data_in = '0;
    qca_round_key[0] = key;
    for (int r = 1; r <= NR; r++) qca_round_key[r] = ref_next_key(qca_round_key[r-1], r);
    repeat (3) @(negedge qca_clk0);
    checks++;
    n_clear++;
    if (qca_data_out != '0) failures++;
    @(posedge qca_clk3);
    qca_clr_n = 1'b1;
    for (int n = 0; n < N + DQ; n++) begin
      @(posedge qca_clk3);
      qca_data_in = (n < N) ? pt[n] : '0;
      @(negedge qca_clk0);
      if (n > 0 && n < N) n_qca_inflight++;
      if (n >= DQ && n - DQ < N) begin
        checks++;
        if (qca_data_out !== ref_encrypt(pt[n-DQ], key, NR)) begin
          failures++;
          $display("qca block %0d: got %h", n-DQ, qca_data_out);
        end
      end
    end
    qca_done = 1;
  end

  // conventional side: the same blocks with a bubble after every second one
  initial begin
    automatic int sent = 0;
    automatic int got = 0;
    automatic int cyc = 0;
    int sent_at [N];
    hdl_rst_n = 0; hdl_in_valid = 0; hdl_data_in = '0; hdl_key_in = key;
    repeat (2) @(posedge hdl_clk);
    #1 hdl_rst_n = 1;
    while (got < N && cyc < 200) begin
      @(negedge hdl_clk);
      cyc++;
      if (hdl_out_valid) begin
        checks += 2;
        if (hdl_data_out !== ref_encrypt(pt[got], key, NR)) failures++;
        if (cyc - sent_at[got] != DH) failures++;
        got++;
      end
      if (sent < N && !(sent % 3 == 2 && hdl_in_valid)) begin
        hdl_in_valid = 1; hdl_data_in = pt[sent]; sent_at[sent] = cyc; sent++;
      end else begin
        if (sent < N) n_bubble++;
        hdl_in_valid = 0;
      end
      if (sent - got >= 2) n_hdl_inflight++;   // two blocks inside at once
    end
    checks++;
    if (got != N) failures++;
    hdl_done = 1;
  end

  initial begin
    wait (qca_done && hdl_done);
    $display("mechanisms: clear=%0d qca_in_flight=%0d hdl_in_flight=%0d hdl_bubbles=%0d",
             n_clear, n_qca_inflight, n_hdl_inflight, n_bubble);
    checks += 4;
    if (n_clear == 0) failures++;
    if (n_qca_inflight == 0) failures++;
    if (n_hdl_inflight == 0) failures++;
    if (n_bubble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
