// Test bench for mseq_error_gen. A reference 17-stage LFSR, stepped one bit
// at a time with taps 17 and 14, is advanced 17 steps per clock alongside the
// generator; err and ch_out are checked every clock against "state below
// threshold" and the XOR of the channel bit. Over one full period (131071
// clocks) the error count must be exactly threshold - 1, and the generator
// must hold its state while adv is low.
module tb_mseq_error_gen;
  localparam int PERIOD = 131071;
  logic clk = 0, rst_n = 0, adv = 0, ch_in = 0, ch_out, err;
  logic [16:0] ber_thr = '0;
  int checks = 0, failures = 0;

  mseq_error_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [16:0] st;

  task automatic step17();
    for (int i = 0; i < 17; i++) st = {st[15:0], st[16] ^ st[13]};
  endtask

  initial begin
    int nerr, mism;
    int thrs[2];
    thrs = '{2753, 65536};
    st = 17'd1;
    rst_n = 0;
    @(posedge clk);
    #1;
    rst_n = 1;
    foreach (thrs[r]) begin
      ber_thr = 17'(thrs[r]);
      nerr = 0;
      mism = 0;
      for (int i = 0; i < PERIOD; i++) begin
        ch_in = 1'($urandom);
        adv   = ($urandom_range(0, 7) != 0);
        #1;
        checks++;
        if (err !== (st < ber_thr) || ch_out !== (ch_in ^ (st < ber_thr))) begin
          mism++;
          failures++;
        end
        if (adv) nerr += err;
        if (!adv) i--;              // count only advancing clocks
        @(posedge clk);
        #1;
        if (adv) step17();
      end
      if (mism != 0) $display("threshold %0d: %0d mismatching clocks", thrs[r], mism);
      checks++;
      if (nerr != thrs[r] - 1) begin
        failures++;
        $display("threshold %0d: %0d errors per period", thrs[r], nerr);
      end
      // after a full period the generator is back where it started
      checks++;
      if (st != 17'd1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
