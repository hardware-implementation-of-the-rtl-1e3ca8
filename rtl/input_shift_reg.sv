// Encoder input shift register.
//
// Collects one block of serial data bits and presents them side by side to
// the parity calculation circuit. Each accepted bit enters at the top and the
// register shifts towards bit 0, so after W shifts the first bit received
// sits in q[0] and the last in q[W-1].
//
// Interface: shift_en takes ser_in on the rising clock edge; q is the
// register contents. The block-level counting is done by the encoder
// controller. Reset (active low, synchronous to clk) clears the register;
// the reset value is this design's choice.
module input_shift_reg #(
  parameter int unsigned W = 256   // data digits per block, (m-1)**n
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         ser_in,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {ser_in, q[W-1:1]};
  end

endmodule
