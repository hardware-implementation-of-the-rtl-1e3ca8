// Test bench for output_shift_reg: loads random words, reads them out with
// random shift gaps and checks the bit order (d[0] first), the hold when
// idle, and that a load overrides a simultaneous shift.
module tb_output_shift_reg;
  localparam int W = 256;
  logic clk = 0, rst_n = 0, load = 0, shift_en = 0, ser_out;
  logic [W-1:0] d = '0;
  int checks = 0, failures = 0;

  output_shift_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_word(logic [W-1:0] w, bit with_shift);
    d        <= w;
    load     <= 1;
    shift_en <= with_shift;
    @(posedge clk);
    load     <= 0;
    shift_en <= 0;
  endtask

  initial begin
    logic [W-1:0] w;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 6; blk++) begin
      for (int i = 0; i < W; i += 32) w[i +: 32] = $urandom;
      load_word(w, blk[0]);
      for (int i = 0; i < W; i++) begin
        #1;
        checks++;
        if (ser_out !== w[i]) failures++;
        while ($urandom_range(0, 3) == 0) begin
          @(posedge clk);
          #1;
        end
        shift_en <= 1;
        @(posedge clk);
        shift_en <= 0;
      end
      #1;
      checks++;
      if (ser_out !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
