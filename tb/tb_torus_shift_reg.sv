// Test bench for torus_shift_reg (4D5, 625 cells): checks against the
// reference model that (1) a parallel-loaded cube is shifted out in torus
// knot order, (2) a serial stream shifted in lands with bit t at the t-th
// cell of the winding, (3) a masked load changes only the selected cells,
// and (4) that the winding puts any m consecutive bits on different lines of
// every axis unless the window crosses a multiple of m**(n-1) (the
// burst-spreading property of the winding).
module tb_torus_shift_reg;
  import tb_tkc_model::*;
  localparam int N = 4, M = 5, CELLS = 625;
  logic clk = 0, rst_n = 0, shift_en = 0, ser_in = 0, ser_out;
  logic [CELLS-1:0] load_en = '0, load_d = '0, q;
  int checks = 0, failures = 0;

  torus_shift_reg #(.N_DIM(N), .M_SIZE(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CELLS-1:0] rand_cube();
    logic [CELLS-1:0] c;
    for (int i = 0; i < CELLS; i++) c[i] = 1'($urandom);
    return c;
  endfunction

  initial begin
    logic [CELLS-1:0] c, mask, prev_q;
    bit stream[];
    int xa[MAXN], xb[MAXN];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // (4) winding property, model only (checks the order the RTL is held to)
    // (windows that cross a multiple of m**(n-1) are the known exceptions)
    for (int t = 0; t + M <= CELLS; t++)
      if ((t % (CELLS / M)) + M <= CELLS / M)
      for (int i = 0; i < M; i++)
        for (int j = i + 1; j < M; j++) begin
          int same;
          to_coords(tx_cell(t + i, N, M), N, M, xa);
          to_coords(tx_cell(t + j, N, M), N, M, xb);
          same = 0;
          for (int k = 0; k < N; k++) same += (xa[k] == xb[k]);
          checks++;
          if (same >= N - 1) failures++;
        end
    $display("winding property: %0d failures", failures);
    for (int rep = 0; rep < 3; rep++) begin
      // (1) load then shift out
      c = rand_cube();
      load_en <= '1;
      load_d  <= c;
      @(posedge clk);
      load_en <= '0;
      for (int t = 0; t < CELLS; t++) begin
        #1;
        checks++;
        if (ser_out !== c[tx_cell(t, N, M)]) failures++;
        shift_en <= 1;
        @(posedge clk);
        shift_en <= 0;
      end
      $display("read-out: %0d failures so far", failures);
      // (2) shift in
      stream = new[CELLS];
      foreach (stream[t]) stream[t] = 1'($urandom);
      for (int t = 0; t < CELLS; t++) begin
        ser_in   = stream[t];
        shift_en = 1;
        @(posedge clk);
        #1;
        shift_en = 0;
        if ($urandom_range(0, 4) == 0) begin
          @(posedge clk);
          #1;
        end
      end
      for (int t = 0; t < CELLS; t++) begin
        checks++;
        if (q[tx_cell(t, N, M)] !== stream[t]) begin
          failures++;
        end
      end
      $display("fill: %0d failures so far", failures);
      // (3) masked load
      prev_q = q;
      mask   = rand_cube();
      c      = rand_cube();
      load_en <= mask;
      load_d  <= c;
      @(posedge clk);
      load_en <= '0;
      #1;
      checks++;
      if (q !== ((mask & c) | (~mask & prev_q))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
