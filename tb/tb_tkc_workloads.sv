// Workload test bench: runs the complete codec (tkc_top) under the code
// sizes and channel conditions evaluated for the torus knot code.
//   u_4d6   4D6 code (1296-bit blocks, 625 data bits), 14 passes with
//           thresholds 4-3-4-3-2-4-3-4-3-4-3-2-4-3, six processes per pass,
//           random errors at about 1 %
//   u_par   4D5 with one-clock passes (SLICES = 1, the five-times faster
//           variant), random errors at 2.1 %
//   u_4d5   4D5 default chip configuration, burst sweep: bursts of
//           L = 4, 8, 16, 32, 48, 64, 80, 96, 112, 128, 160 and 240 inverted
//           bits every 800 channel bits, four blocks per length, no random
//           errors
// Each run checks its encoder output, its decoded output against the
// reference model and its decoding latency; this bench adds up the checks
// and prints how many blocks hit by errors were fully restored.
module tb_tkc_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NR = 3;
  localparam int NL = 12, PER = 4;   // burst lengths, blocks per length
  localparam int BL [NL] = '{4, 8, 16, 32, 48, 64, 80, 96, 112, 128, 160, 240};
  logic done [NR];
  int   chk [NR], fail [NR], rest [NR], eblk [NR], cerr [NR], blk [NR];
  int   burst_len;

  tb_codec_run #(.N(4), .M(6), .NITER(14),
    .THRESH({4'd3, 4'd4, 4'd2, 4'd3, 4'd4, 4'd3, 4'd4, 4'd3, 4'd4, 4'd2, 4'd3, 4'd4, 4'd3, 4'd4}),
    .SLICES(6), .BLOCKS(3)) u_4d6 (
    .clk, .rst_n, .ber_thr(1312), .burst_len(0),
    .done(done[0]), .checks(chk[0]), .failures(fail[0]),
    .restored_blocks(rest[0]), .err_blocks(eblk[0]), .chan_errors(cerr[0]), .blk(blk[0]));

  tb_codec_run #(.SLICES(1), .BLOCKS(6)) u_par (
    .clk, .rst_n, .ber_thr(2753), .burst_len(0),
    .done(done[2]), .checks(chk[2]), .failures(fail[2]),
    .restored_blocks(rest[2]), .err_blocks(eblk[2]), .chan_errors(cerr[2]), .blk(blk[2]));

  assign burst_len = BL[(blk[1] / PER) % NL];

  tb_codec_run #(.BLOCKS(NL * PER)) u_4d5 (
    .clk, .rst_n, .ber_thr(0), .burst_len,
    .done(done[1]), .checks(chk[1]), .failures(fail[1]),
    .restored_blocks(rest[1]), .err_blocks(eblk[1]), .chan_errors(cerr[1]), .blk(blk[1]));

  // restored blocks per burst length, sampled as each block leaves the channel
  int rest_at [NL*PER+1], hit_at [NL*PER+1];

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures, last_blk;
    bit all_done;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    all_done = 0;
    last_blk = 0;
    rest_at[0] = 0;
    hit_at[0]  = 0;
    while (!all_done) begin
      @(posedge clk);
      #1;
      // the model of block b has run once block b+1 is on the channel
      if (blk[1] != last_blk) begin
        last_blk = blk[1];
        rest_at[last_blk] = rest[1];
        hit_at[last_blk]  = eblk[1];
      end
      all_done = 1;
      foreach (done[i]) if (!done[i]) all_done = 0;
    end
    rest_at[NL*PER] = rest[1];
    hit_at[NL*PER]  = eblk[1];
    checks = 0;
    failures = 0;
    foreach (chk[i]) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("4D6, 1 %% random: %0d channel errors, %0d of %0d hit blocks restored",
             cerr[0], rest[0], eblk[0]);
    $display("4D5 one-clock passes, 2.1 %% random: %0d channel errors, %0d of %0d hit blocks restored",
             cerr[2], rest[2], eblk[2]);
    for (int i = 0; i < NL; i++)
      $display("4D5 burst length %0d every 800 bits: %0d of %0d hit blocks restored",
               BL[i], rest_at[PER*i+PER] - rest_at[PER*i], hit_at[PER*i+PER] - hit_at[PER*i]);
    foreach (eblk[i]) begin
      checks++;
      if (eblk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
