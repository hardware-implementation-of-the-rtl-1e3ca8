// Test bench for tkc_decoder (4D5, thresholds 4-3-4-3-2-4-3, five processes
// per pass). Code blocks are built with the reference model, hit with error
// patterns (none, single errors, random errors near 2 %, a 32-bit burst, a
// 6-bit burst plus 1.25 % random errors, and a heavy 8 % random load), sent
// in torus knot order through the serial input, and the decoded data are
// compared with the reference model's iterated majority decoding of the same
// received block. Blocks that the model restores completely must also come
// out equal to the original data.
//
// Phase 1 uses random valid/ready gaps; phase 2 keeps both sides ready and
// checks the timing: 35 decoding clocks plus the transfer, so the first
// decoded bit is taken 37 clock edges after the last received bit. The
// decoding stall (in_ready low with data waiting), output back-pressure, and
// actual corrections must all occur.
module tb_tkc_decoder;
  import tb_tkc_model::*;
  localparam int N = 4, M = 5, CELLS = 625, DATA = 256, SLICES = 5;
  localparam int BLOCKS1 = 6, BLOCKS2 = 6, BLOCKS = BLOCKS1 + BLOCKS2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_data = 0, out_valid, out_ready = 0, out_data;
  int checks = 0, failures = 0;

  tkc_decoder dut (.*);

  always #5 clk = ~clk;

  bit in_bits[$], exp_bits[$], orig_bits[$];
  bit restored[BLOCKS];
  int cyc = 0, in_sent = 0, out_got = 0, stalls = 0, backp = 0, flips = 0, nerr = 0;
  int restored_blocks = 0, blk_fail = 0;
  int last_in_cyc[BLOCKS], first_out_cyc[BLOCKS];
  bit phase2 = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit data[], cube[], rx[];
    int thr[];
    thr = '{4, 3, 4, 3, 2, 4, 3};
    for (int b = 0; b < BLOCKS; b++) begin
      int kind, e;
      data = new[DATA];
      foreach (data[j]) data[j] = 1'($urandom);
      encode(data, N, M, cube);
      // serial stream in transmission order, with errors
      rx = new[CELLS];
      for (int t = 0; t < CELLS; t++) rx[t] = cube[tx_cell(t, N, M)];
      kind = b % 6;
      e = 0;
      case (kind)
        0: ;
        1: for (int i = 0; i < 3; i++) begin rx[$urandom_range(0, CELLS - 1)] ^= 1'b1; e++; end
        2: for (int t = 0; t < CELLS; t++) if ($urandom_range(0, 999) < 21) begin rx[t] ^= 1'b1; e++; end
        3: begin
             int s;
             s = $urandom_range(0, CELLS - 33);
             for (int t = s; t < s + 32; t++) begin rx[t] ^= 1'b1; e++; end
           end
        4: begin
             int s;
             s = $urandom_range(0, CELLS - 7);
             for (int t = s; t < s + 6; t++) begin rx[t] ^= 1'b1; e++; end
             for (int t = 0; t < CELLS; t++) if ($urandom_range(0, 9999) < 125) begin rx[t] ^= 1'b1; e++; end
           end
        default: for (int t = 0; t < CELLS; t++) if ($urandom_range(0, 99) < 8) begin rx[t] ^= 1'b1; e++; end
      endcase
      nerr += e;
      foreach (rx[t]) in_bits.push_back(rx[t]);
      // reference decoding of the received cube
      for (int t = 0; t < CELLS; t++) cube[tx_cell(t, N, M)] = rx[t];
      flips += decode(cube, N, M, thr, SLICES);
      restored[b] = 1;
      for (int j = 0; j < DATA; j++) begin
        exp_bits.push_back(cube[data_cell(j, N, M)]);
        orig_bits.push_back(data[j]);
        if (cube[data_cell(j, N, M)] != data[j]) restored[b] = 0;
      end
      if (restored[b]) restored_blocks++;
      $display("block %0d: pattern %0d, %0d channel errors, model restores data: %0d",
               b, kind, e, restored[b]);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) stalls++;
      if (out_valid && !out_ready) backp++;
      if (out_valid && out_ready) begin
        if (out_got % DATA == 0) first_out_cyc[out_got / DATA] = cyc;
        checks++;
        if (out_data !== exp_bits[out_got]) failures++;
        if (restored[out_got / DATA]) begin
          checks++;
          if (out_data !== orig_bits[out_got]) failures++;
        end
        out_got++;
      end
      if (in_valid && in_ready) begin
        if (in_sent % CELLS == CELLS - 1) last_in_cyc[in_sent / CELLS] = cyc;
        in_sent++;
      end
      if (!phase2 && in_sent == BLOCKS1 * CELLS) begin
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
      if (in_sent == BLOCKS1 * CELLS && out_got == BLOCKS1 * DATA) phase2 <= 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (out_got == BLOCKS * DATA);
    repeat (3) @(posedge clk);
    for (int b = BLOCKS1; b < BLOCKS; b++) begin
      checks++;
      if (first_out_cyc[b] - last_in_cyc[b] != 7 * SLICES + 2) begin
        failures++;
        $display("block %0d: latency %0d, expected %0d", b,
                 first_out_cyc[b] - last_in_cyc[b], 7 * SLICES + 2);
      end
    end
    checks++;
    if (stalls == 0) failures++;
    checks++;
    if (backp == 0) failures++;
    checks++;
    if (flips == 0) failures++;
    checks++;
    if (restored_blocks == 0) failures++;
    $display("channel errors %0d, corrections %0d, blocks restored %0d of %0d",
             nerr, flips, restored_blocks, BLOCKS);
    $display("decoding stalls %0d, output back-pressure cycles %0d", stalls, backp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
