// Test bench for enc_parity_calc: random data blocks for the 4D5 default and
// a 3D4 instance; compares the cube with the reference model's encoding and
// checks independently that every line along every axis has even parity and
// that each data bit appears unchanged at its cell.
module tb_enc_parity_calc;
  import tb_tkc_model::*;
  int checks = 0, failures = 0;

  logic [255:0] d5;
  logic [624:0] c5;
  logic [26:0]  d4;
  logic [63:0]  c4;

  enc_parity_calc dut5 (.data(d5), .cube(c5));
  enc_parity_calc #(.N_DIM(3), .M_SIZE(4)) dut4 (.data(d4), .cube(c4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int m, int reps);
    bit data[], cube[], got[];
    int cells = pw(m, n), nd = pw(m - 1, n);
    for (int r = 0; r < reps; r++) begin
      data = new[nd];
      foreach (data[j]) data[j] = (r == 0) ? 1'b1 : 1'($urandom);
      got = new[cells];
      if (n == 4) begin
        foreach (data[j]) d5[j] = data[j];
        #1;
        foreach (got[a]) got[a] = c5[a];
      end else begin
        foreach (data[j]) d4[j] = data[j];
        #1;
        foreach (got[a]) got[a] = c4[a];
      end
      encode(data, n, m, cube);
      checks++;
      if (got != cube) failures++;
      for (int a = 0; a < cells; a++)
        for (int k = 0; k < n; k++) begin
          checks++;
          if (line_par(got, a, k, n, m) != 0) failures++;
        end
      for (int j = 0; j < nd; j++) begin
        checks++;
        if (got[data_cell(j, n, m)] != data[j]) failures++;
      end
    end
  endtask

  initial begin
    check(4, 5, 20);
    check(3, 4, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
