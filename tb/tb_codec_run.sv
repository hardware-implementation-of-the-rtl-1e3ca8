// Reusable end-to-end run of tkc_top for the workload test bench: BLOCKS
// random data blocks are encoded, sent through the chip's random error adder
// (threshold ber_thr, bit error rate (ber_thr-1)/131071) and through a burst
// injector that inverts burst_len consecutive bits every BURST_PERIOD
// channel bits, then decoded. Every encoder output bit is compared with the
// reference code word, every decoded bit with the reference model's decoding
// of the bits actually received, and every block's decoding latency with
// NITER*SLICES + 2 clocks. Reports its counts on its ports when done.
module tb_codec_run #(
  parameter int N = 4,
  parameter int M = 5,
  parameter int NITER = 7,
  parameter logic [4*NITER-1:0] THRESH = {4'd3, 4'd4, 4'd2, 4'd3, 4'd4, 4'd3, 4'd4},
  parameter int SLICES = 5,
  parameter int BLOCKS = 4,
  parameter int BURST_PERIOD = 800
) (
  input  logic clk,
  input  logic rst_n,
  input  int   ber_thr,     // error adder threshold, BER = (ber_thr-1)/131071
  input  int   burst_len,   // inverted bits per burst, 0 = no bursts
  output logic done,
  output int   checks,
  output int   failures,
  output int   restored_blocks,
  output int   err_blocks,
  output int   chan_errors,
  output int   blk          // block now on the channel
);
  import tb_tkc_model::*;
  localparam int CELLS = pw(M, N), DATA = pw(M - 1, N);

  logic        enc_in_valid, enc_in_ready, enc_in_data;
  logic        enc_out_valid, enc_out_ready, enc_out_data;
  logic        dec_in_valid, dec_in_ready, dec_in_data;
  logic        dec_out_valid, dec_out_ready, dec_out_data;
  logic        err_adv, err_ch_in, err_ch_out, err_flag;
  logic [16:0] err_ber_thr;
  logic        burst_flip;

  tkc_top #(.N_DIM(N), .M_SIZE(M), .NUM_ITER(NITER), .THRESH(THRESH), .SLICES(SLICES)) dut (.*);

  assign err_ch_in     = enc_out_data;
  assign dec_in_valid  = enc_out_valid;
  assign enc_out_ready = dec_in_ready;
  assign err_adv       = enc_out_valid && dec_in_ready;
  assign err_ber_thr   = 17'(ber_thr);
  assign dec_in_data   = err_ch_out ^ burst_flip;
  assign dec_out_ready = 1'b1;

  bit data_bits[$], code_bits[$], rx_bits[$], exp_out[$];
  bit restored[BLOCKS];
  int nerr_blk[BLOCKS];
  int cyc, in_sent, ch_cnt, out_got;
  int last_rx_cyc[BLOCKS], first_out_cyc[BLOCKS];
  int thr[];

  assign blk = ch_cnt / CELLS;

  assign burst_flip = (burst_len > 0) && ((ch_cnt % BURST_PERIOD) >= 100) &&
                      ((ch_cnt % BURST_PERIOD) < 100 + burst_len);

  initial begin
    bit data[], cube[];
    thr = new[NITER];
    foreach (thr[i]) thr[i] = int'(THRESH[4*i +: 4]);
    for (int b = 0; b < BLOCKS; b++) begin
      data = new[DATA];
      foreach (data[j]) data[j] = 1'($urandom);
      foreach (data[j]) data_bits.push_back(data[j]);
      encode(data, N, M, cube);
      for (int t = 0; t < CELLS; t++) code_bits.push_back(cube[tx_cell(t, N, M)]);
      nerr_blk[b] = 0;
    end
  end

  task automatic model_block(int b);
    bit cube[];
    cube = new[CELLS];
    for (int t = 0; t < CELLS; t++) cube[tx_cell(t, N, M)] = rx_bits[b * CELLS + t];
    void'(decode(cube, N, M, thr, SLICES));
    restored[b] = 1;
    for (int j = 0; j < DATA; j++) begin
      exp_out.push_back(cube[data_cell(j, N, M)]);
      if (cube[data_cell(j, N, M)] != data_bits[b * DATA + j]) restored[b] = 0;
    end
    if (nerr_blk[b] > 0) err_blocks++;
    if (nerr_blk[b] > 0 && restored[b]) restored_blocks++;
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; in_sent = 0; ch_cnt = 0; out_got = 0;
      checks = 0; failures = 0; restored_blocks = 0; err_blocks = 0; chan_errors = 0;
      done = 0;
      enc_in_valid <= 0;
      enc_in_data  <= 0;
    end else begin
      cyc++;
      if (enc_out_valid && dec_in_ready) begin
        checks++;
        if (enc_out_data !== code_bits[ch_cnt]) failures++;
        if (dec_in_data != code_bits[ch_cnt]) begin
          nerr_blk[ch_cnt / CELLS]++;
          chan_errors++;
        end
        rx_bits.push_back(dec_in_data);
        if (ch_cnt % CELLS == CELLS - 1) begin
          last_rx_cyc[ch_cnt / CELLS] = cyc;
          model_block(ch_cnt / CELLS);
        end
        ch_cnt++;
      end
      if (dec_out_valid && dec_out_ready) begin
        if (out_got % DATA == 0) begin
          first_out_cyc[out_got / DATA] = cyc;
          checks++;
          if (cyc - last_rx_cyc[out_got / DATA] != NITER * SLICES + 2) failures++;
        end
        checks++;
        if (dec_out_data !== exp_out[out_got]) failures++;
        if (restored[out_got / DATA]) begin
          checks++;
          if (dec_out_data !== data_bits[out_got]) failures++;
        end
        out_got++;
        if (out_got == BLOCKS * DATA) done = 1;
      end
      if (enc_in_valid && enc_in_ready) in_sent++;
      if (in_sent < data_bits.size()) begin
        enc_in_valid <= 1'b1;
        enc_in_data  <= data_bits[in_sent];
      end else begin
        enc_in_valid <= 1'b0;
      end
    end
  end
endmodule
