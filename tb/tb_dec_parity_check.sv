// Test bench for dec_parity_check (4D5): random cubes, valid code words and
// code words with a few errors; each of the 500 line syndromes is compared
// with the reference model's line parity (line l of axis k is the line
// through the cell whose address, with coordinate k removed, is l).
module tb_dec_parity_check;
  import tb_tkc_model::*;
  localparam int N = 4, M = 5, CELLS = 625, LINES = 125;
  logic [CELLS-1:0] cube;
  logic [N*LINES-1:0] syn;
  int checks = 0, failures = 0;

  dec_parity_check dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c[], data[];
    int x[MAXN];
    for (int r = 0; r < 30; r++) begin
      if (r % 3 == 0) begin
        c = new[CELLS];
        foreach (c[a]) c[a] = 1'($urandom);
      end else begin
        data = new[256];
        foreach (data[j]) data[j] = 1'($urandom);
        encode(data, N, M, c);
        for (int e = 0; e < (r % 3 == 1 ? 0 : 4); e++) c[$urandom_range(0, CELLS - 1)] ^= 1'b1;
      end
      foreach (c[a]) cube[a] = c[a];
      #1;
      for (int k = 0; k < N; k++)
        for (int a = 0; a < CELLS; a++) begin
          int l;
          to_coords(a, N, M, x);
          if (x[k] != 0) continue;
          // address with coordinate k removed
          l = 0;
          for (int i = N - 1; i >= 0; i--) if (i != k) l = l * M + x[i];
          checks++;
          if (syn[k*LINES + l] !== line_par(c, a, k, N, M)) failures++;
        end
      if (r % 3 == 1) begin
        checks++;
        if (syn !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
