// Test bench for tkc_encoder (4D5). Random data blocks are fed through the
// serial input handshake; the serial output is compared bit by bit with the
// reference model (parity cube sent in torus knot order). Phase 1 uses random
// valid/ready gaps; phase 2 keeps both sides always ready and checks the
// timing: the block is transferred on the clock after its last data bit and
// its first code bit is taken on the clock after that (two edges later),
// and a new block leaves every 625 clocks. Input stalls (in_ready low while
// data waits) and output back-pressure must both occur.
module tb_tkc_encoder;
  import tb_tkc_model::*;
  localparam int N = 4, M = 5, CELLS = 625, DATA = 256;
  localparam int BLOCKS1 = 4, BLOCKS2 = 4, BLOCKS = BLOCKS1 + BLOCKS2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_data = 0, out_valid, out_ready = 0, out_data;
  int checks = 0, failures = 0;

  tkc_encoder dut (.*);

  always #5 clk = ~clk;

  bit in_bits[$], exp_bits[$];
  int cyc = 0, in_sent = 0, out_got = 0, stalls = 0, backp = 0;
  int last_in_cyc[BLOCKS], first_out_cyc[BLOCKS];
  bit phase2 = 0;

  initial begin
    repeat (40000) @(posedge clk);
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
      foreach (data[j]) in_bits.push_back(data[j]);
      encode(data, N, M, cube);
      for (int t = 0; t < CELLS; t++) exp_bits.push_back(cube[tx_cell(t, N, M)]);
    end
  end

  // monitor, then driver (one process, so both see the same pre-edge state)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) stalls++;
      if (out_valid && !out_ready) backp++;
      if (out_valid && out_ready) begin
        if (out_got % CELLS == 0) first_out_cyc[out_got / CELLS] = cyc;
        checks++;
        if (out_data !== exp_bits[out_got]) failures++;
        out_got++;
      end
      if (in_valid && in_ready) begin
        if (in_sent % DATA == DATA - 1) last_in_cyc[in_sent / DATA] = cyc;
        in_sent++;
      end
      if (!phase2 && in_sent == BLOCKS1 * DATA) begin
        in_valid <= 0;
      end else if (in_sent < in_bits.size()) begin
        if (!in_valid || in_ready || phase2) begin
          in_valid <= phase2 || ($urandom_range(0, 3) != 0);
          in_data  <= in_bits[in_sent];
        end
      end else begin
        in_valid <= 0;
      end
      out_ready <= phase2 || ($urandom_range(0, 3) != 0);
      if (in_sent == BLOCKS1 * DATA && out_got == BLOCKS1 * CELLS) phase2 <= 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (out_got == BLOCKS * CELLS);
    repeat (3) @(posedge clk);
    // phase 2 timing: first block of phase 2 starts once its data are in
    checks++;
    if (first_out_cyc[BLOCKS1] - last_in_cyc[BLOCKS1] != 2) begin
      failures++;
      $display("latency %0d, expected 2", first_out_cyc[BLOCKS1] - last_in_cyc[BLOCKS1]);
    end
    for (int b = BLOCKS1 + 1; b < BLOCKS; b++) begin
      checks++;
      if (first_out_cyc[b] - first_out_cyc[b-1] != CELLS) begin
        failures++;
        $display("block period %0d, expected %0d", first_out_cyc[b] - first_out_cyc[b-1], CELLS);
      end
    end
    checks++;
    if (stalls == 0) failures++;
    checks++;
    if (backp == 0) failures++;
    $display("input stalls %0d, output back-pressure cycles %0d", stalls, backp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
