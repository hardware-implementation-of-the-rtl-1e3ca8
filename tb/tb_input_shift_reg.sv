// Test bench for input_shift_reg: shifts in random bits with random gaps and
// checks that after W accepted bits q holds them in arrival order (first bit
// in q[0]) and that the register holds while shift_en is low.
module tb_input_shift_reg;
  localparam int W = 256;
  logic clk = 0, rst_n = 0, shift_en = 0, ser_in = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  bit ref_bits[$];

  input_shift_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000 * W / 16 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (q !== '0) failures++;
    for (int blk = 0; blk < 6; blk++) begin
      int n;
      n = 0;
      ref_bits.delete();
      while (n < W) begin
        shift_en <= ($urandom_range(0, 3) != 0);
        ser_in   <= 1'($urandom);
        @(posedge clk);
        #1;
        if (shift_en) begin
          ref_bits.push_back(ser_in);
          n++;
        end
      end
      shift_en <= 0;
      @(posedge clk);
      for (int i = 0; i < W; i++) begin
        checks++;
        if (q[i] !== ref_bits[i]) failures++;
      end
      // hold
      begin
        logic [W-1:0] held;
        held = q;
        repeat (5) @(posedge clk);
        checks++;
        if (q !== held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
