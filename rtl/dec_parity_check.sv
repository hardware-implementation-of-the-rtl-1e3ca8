// Decoder parity calculation circuit.
//
// Checks the even parity of every line of the received cube: for each axis k
// (0 .. n-1) and each of the m**(n-1) lines along it, syn[k*LINES + l] is the
// XOR of the m cells of line l (tkc_pkg::line_cell), so 1 marks a failed
// parity line. With the 4D5 code that is 500 five-input XOR gates.
//
// Purely combinational and fully parallel; the lines are pure wiring from the
// torus shift register cells, which is what lets a whole decoding pass run
// in a single clock. The check itself follows the code definition; the
// numbering of lines in syn is this design's choice.
module dec_parity_check
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM  = N_DIM_DEF,
  parameter int unsigned M_SIZE = M_SIZE_DEF,
  localparam int unsigned CELLS = ipow(M_SIZE, N_DIM),
  localparam int unsigned LINES = ipow(M_SIZE, N_DIM - 1)
) (
  input  logic [CELLS-1:0]       cube,
  output logic [N_DIM*LINES-1:0] syn
);

  for (genvar k = 0; k < N_DIM; k++) begin : g_axis
    for (genvar l = 0; l < LINES; l++) begin : g_line
      logic [M_SIZE-1:0] members;
      for (genvar i = 0; i < M_SIZE; i++) begin : g_mem
        assign members[i] = cube[line_cell(l, k, i, M_SIZE)];
      end
      assign syn[k*LINES + l] = ^members;
    end
  end

endmodule
