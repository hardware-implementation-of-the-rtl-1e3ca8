// Decoder output shift register.
//
// After a block has been decoded only its data digits are loaded here in
// parallel, then read out serially, d[0] first. load has priority over
// shift_en; a loaded word appears on ser_out in the next cycle and each
// shift_en moves the next bit to ser_out one cycle later. Vacated positions
// fill with 0. Reset (active low, synchronous) clears the register.
module output_shift_reg #(
  parameter int unsigned W = 256   // data digits per block, (m-1)**n
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         shift_en,
  output logic         ser_out
);

  logic [W-1:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n)        r <= '0;
    else if (load)     r <= d;
    else if (shift_en) r <= {1'b0, r[W-1:1]};
  end

  assign ser_out = r[0];

endmodule
