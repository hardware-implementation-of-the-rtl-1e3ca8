// End-to-end test bench for tkc_top at its default (4D5) configuration.
//
// Random data blocks go into the encoder; its serial output passes through
// the chip's m-sequence random error adder and then through a burst injector
// here, into the decoder; the decoded data are read from the decoder output.
// Schedule of channel conditions (by block):
//   0-3  random errors at (2753-1)/131071 = 2.1 %, the reference chip's
//        correctable mean BER
//   4    random errors off, one 32-bit all-flipped burst
//   5-9  random errors at 1.25 % plus a 6-bit burst every 800 channel bits
//        (the mixed-error condition of the reference simulations)
//
// Checks: every encoder output bit against the reference model's code word in
// transmission order; every decoded bit against the reference model's
// decoding of the bits the decoder actually received; decoded blocks that the
// model restores must equal the original data. Timing: with the output free,
// the first decoded bit is taken 37 clocks after the block's last bit.
// Mechanisms counted (each must occur): encoder input stall, decoder
// decoding stall, decoder output back-pressure, random channel errors, burst
// errors, digit corrections, fully restored blocks with channel errors.
module tb_tkc_top;
  import tb_tkc_model::*;
  localparam int N = 4, M = 5, CELLS = 625, DATA = 256, SLICES = 5, NITER = 7;
  localparam int BLOCKS = 10;

  logic        clk = 0, rst_n = 0;
  logic        enc_in_valid = 0, enc_in_ready, enc_in_data = 0;
  logic        enc_out_valid, enc_out_ready, enc_out_data;
  logic        dec_in_valid, dec_in_ready, dec_in_data;
  logic        dec_out_valid, dec_out_ready = 0, dec_out_data;
  logic        err_adv, err_ch_in, err_ch_out, err_flag;
  logic [16:0] err_ber_thr = '0;
  logic        burst_flip;
  int checks = 0, failures = 0;

  tkc_top dut (.*);

  always #5 clk = ~clk;

  // channel: encoder -> random error adder -> burst injector -> decoder
  assign err_ch_in     = enc_out_data;
  assign dec_in_valid  = enc_out_valid;
  assign enc_out_ready = dec_in_ready;
  assign err_adv       = enc_out_valid && dec_in_ready;
  assign dec_in_data   = err_ch_out ^ burst_flip;

  bit data_bits[$], code_bits[$];
  bit rx_bits[$];
  bit exp_out[$];
  bit restored[BLOCKS];
  int nerr_blk[BLOCKS];
  int cyc = 0, in_sent = 0, ch_cnt = 0, out_got = 0;
  int enc_stalls = 0, dec_stalls = 0, backp = 0, rnd_err = 0, bst_err = 0;
  int flips = 0, restored_err_blocks = 0, lat_checked = 0;
  int last_rx_cyc[BLOCKS], first_out_cyc[BLOCKS];
  int burst_start;

  initial begin
    repeat (BLOCKS * 900 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit data[], cube[];
    for (int b = 0; b < BLOCKS; b++) begin
      data = new[DATA];
      foreach (data[j]) data[j] = 1'($urandom);
      foreach (data[j]) data_bits.push_back(data[j]);
      encode(data, N, M, cube);
      for (int t = 0; t < CELLS; t++) code_bits.push_back(cube[tx_cell(t, N, M)]);
    end
    burst_start = 4 * CELLS + 100;
  end

  function automatic int blk_of_ch(int c);
    return c / CELLS;
  endfunction

  // burst injector: 32-bit burst in block 4, 6-bit bursts every 800 bits from block 5
  always_comb begin
    int b;
    b = blk_of_ch(ch_cnt);
    if (b == 4)      burst_flip = (ch_cnt >= burst_start) && (ch_cnt < burst_start + 32);
    else if (b >= 5) burst_flip = ((ch_cnt % 800) >= 300) && ((ch_cnt % 800) < 306);
    else             burst_flip = 1'b0;
  end

  // decode one received block with the reference model
  task automatic model_block(int b);
    bit cube[];
    int thr[];
    thr = '{4, 3, 4, 3, 2, 4, 3};
    cube = new[CELLS];
    for (int t = 0; t < CELLS; t++) cube[tx_cell(t, N, M)] = rx_bits[b * CELLS + t];
    flips += decode(cube, N, M, thr, SLICES);
    restored[b] = 1;
    for (int j = 0; j < DATA; j++) begin
      exp_out.push_back(cube[data_cell(j, N, M)]);
      if (cube[data_cell(j, N, M)] != data_bits[b * DATA + j]) restored[b] = 0;
    end
    if (restored[b] && nerr_blk[b] > 0) restored_err_blocks++;
    $display("block %0d: %0d channel errors, restored %0d", b, nerr_blk[b], restored[b]);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // ---- monitor
      if (enc_in_valid && !enc_in_ready) enc_stalls++;
      if (dec_in_valid && !dec_in_ready) dec_stalls++;
      if (dec_out_valid && !dec_out_ready) backp++;
      if (enc_out_valid && dec_in_ready) begin
        int b;
        b = blk_of_ch(ch_cnt);
        checks++;
        if (enc_out_data !== code_bits[ch_cnt]) failures++;
        if (err_flag) rnd_err++;
        if (burst_flip) bst_err++;
        if (dec_in_data != code_bits[ch_cnt]) nerr_blk[b]++;
        rx_bits.push_back(dec_in_data);
        if (ch_cnt % CELLS == CELLS - 1) begin
          last_rx_cyc[b] = cyc;
          model_block(b);
        end
        ch_cnt++;
      end
      if (dec_out_valid && dec_out_ready) begin
        int b;
        b = out_got / DATA;
        if (out_got % DATA == 0) first_out_cyc[b] = cyc;
        checks++;
        if (dec_out_data !== exp_out[out_got]) failures++;
        if (restored[b]) begin
          checks++;
          if (dec_out_data !== data_bits[out_got]) failures++;
        end
        out_got++;
      end
      if (enc_in_valid && enc_in_ready) in_sent++;
      // ---- drivers
      if (in_sent < data_bits.size()) begin
        if (!enc_in_valid || enc_in_ready) begin
          enc_in_valid <= ($urandom_range(0, 7) != 0);
          enc_in_data  <= data_bits[in_sent];
        end
      end else begin
        enc_in_valid <= 0;
      end
      // output back-pressure while blocks 1-3 are being read out
      dec_out_ready <= (out_got >= DATA && out_got < 4 * DATA) ? ($urandom_range(0, 9) == 0) : 1'b1;
      // channel error rate schedule
      err_ber_thr <= (blk_of_ch(ch_cnt) < 4) ? 17'd2753 :
                     (blk_of_ch(ch_cnt) == 4) ? 17'd0 : 17'd1639;
    end
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    wait (out_got == BLOCKS * DATA);
    repeat (3) @(posedge clk);
    // latency for blocks decoded while the output side was free
    for (int b = 5; b < BLOCKS; b++) begin
      checks++;
      lat_checked++;
      if (first_out_cyc[b] - last_rx_cyc[b] != NITER * SLICES + 2) begin
        failures++;
        $display("block %0d: decode latency %0d, expected %0d", b,
                 first_out_cyc[b] - last_rx_cyc[b], NITER * SLICES + 2);
      end
    end
    $display("encoder input stalls %0d", enc_stalls);
    $display("decoder decoding stalls %0d", dec_stalls);
    $display("decoder output back-pressure cycles %0d", backp);
    $display("random channel errors %0d, burst errors %0d", rnd_err, bst_err);
    $display("model corrections %0d, blocks restored despite errors %0d", flips, restored_err_blocks);
    checks += 7;
    if (enc_stalls == 0) failures++;
    if (dec_stalls == 0) failures++;
    if (backp == 0) failures++;
    if (rnd_err == 0) failures++;
    if (bst_err == 0) failures++;
    if (flips == 0) failures++;
    if (restored_err_blocks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
