// Torus-connected shift register.
//
// One flip-flop per code point of the nDm cube, indexed by the cell's linear
// cube address. The serial shift path does not follow the address order: the
// wiring between cells follows the torus knot transmission order of
// tkc_pkg::torus_addr, so cell torus_addr(t) takes its next value from cell
// torus_addr(t+1) and the last cell of the winding takes ser_in. Shifting
// therefore sends the cube out, and takes a received block in, obliquely
// along the discrete torus knot, with no address logic at all.
//
// The encoder uses it as its output register (parallel load of the coded
// cube, serial read-out on ser_out); the decoder uses it as its input
// register (serial fill from ser_in, after which each received digit sits at
// its own cube cell) and writes the corrected digits back through the
// per-cell load mask.
//
// Timing: one shift per clock with shift_en. A cell whose load_en bit is set
// takes load_d instead of shifting. q is the whole register; ser_out is the
// cell sent first, torus_addr(0). Reset (active low, synchronous) clears all
// cells. The torus-connected register follows the reference architecture;
// the winding formula and the per-cell load mask are this design's choices.
module torus_shift_reg
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM  = N_DIM_DEF,
  parameter int unsigned M_SIZE = M_SIZE_DEF,
  localparam int unsigned CELLS = ipow(M_SIZE, N_DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             ser_in,
  input  logic [CELLS-1:0] load_en,
  input  logic [CELLS-1:0] load_d,
  output logic [CELLS-1:0] q,
  output logic             ser_out
);

  // Value each cell takes on a shift: its successor along the torus winding.
  logic [CELLS-1:0] shift_d;

  for (genvar t = 0; t < CELLS; t++) begin : g_wind
    localparam int unsigned A = torus_addr(t, N_DIM, M_SIZE);
    if (t == CELLS - 1) begin : g_last
      assign shift_d[A] = ser_in;
    end else begin : g_link
      localparam int unsigned A_NEXT = torus_addr(t + 1, N_DIM, M_SIZE);
      assign shift_d[A] = q[A_NEXT];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= (load_en & load_d) | (~load_en & (shift_en ? shift_d : q));
  end

  assign ser_out = q[torus_addr(0, N_DIM, M_SIZE)];

endmodule
