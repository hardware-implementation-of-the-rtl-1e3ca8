// Test bench for majority_logic (4D5): random cubes, syndromes and thresholds
// 0..5; for each cell the number of failed lines through it is counted here
// from the syndrome vector and the expected flip (count >= threshold) and
// corrected digit are compared with the circuit's outputs.
module tb_majority_logic;
  import tb_tkc_model::*;
  localparam int N = 4, M = 5, CELLS = 625, LINES = 125;
  logic [CELLS-1:0] cube, corr, flip;
  logic [N*LINES-1:0] syn;
  logic [2:0] thr;
  int checks = 0, failures = 0;

  majority_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x[MAXN];
    int hist[5];
    foreach (hist[i]) hist[i] = 0;
    for (int r = 0; r < 36; r++) begin
      for (int a = 0; a < CELLS; a++) cube[a] = 1'($urandom);
      for (int i = 0; i < N * LINES; i++) syn[i] = ($urandom_range(0, 99) < 10 + 2 * r);
      thr = 3'(r % 6);
      #1;
      for (int a = 0; a < CELLS; a++) begin
        int cnt;
        bit exp_flip;
        cnt = 0;
        to_coords(a, N, M, x);
        for (int k = 0; k < N; k++) begin
          int l;
          l = 0;
          for (int i = N - 1; i >= 0; i--) if (i != k) l = l * M + x[i];
          cnt += syn[k*LINES + l];
        end
        hist[cnt]++;
        exp_flip = (cnt >= thr);
        checks++;
        if (flip[a] !== exp_flip || corr[a] !== (cube[a] ^ exp_flip)) failures++;
      end
    end
    // every count value must have been exercised
    foreach (hist[i]) begin
      checks++;
      if (hist[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
