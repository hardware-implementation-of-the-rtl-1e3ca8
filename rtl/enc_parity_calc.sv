// Encoder parity calculation circuit.
//
// Places the (m-1)**n data digits of a block in the cube (data bit j goes to
// the cell whose coordinates are the base-(m-1) digits of j, see
// tkc_pkg::data_addr) and fills every cell with a coordinate equal to m-1 with
// an even-parity digit. The parity digits are computed axis by axis: stage
// k+1 sets the cells with xk = m-1 to the XOR of the other m-1 cells of their
// line along axis k in stage k. Because earlier stages already hold the
// parities of earlier axes, the parity-on-parity cells come out consistent
// and every line along every axis has even parity.
//
// Purely combinational: n levels of (m-1)-input XOR gates. The encoder
// registers the result into its torus shift register in the same clock in
// which the block is transferred.
module enc_parity_calc
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM  = N_DIM_DEF,
  parameter int unsigned M_SIZE = M_SIZE_DEF,
  localparam int unsigned CELLS = ipow(M_SIZE, N_DIM),
  localparam int unsigned DATA  = ipow(M_SIZE - 1, N_DIM)
) (
  input  logic [DATA-1:0]  data,
  output logic [CELLS-1:0] cube
);

  logic [CELLS-1:0] placed;

  // Stage 0: data digits in their cells, parity cells still 0.
  for (genvar a = 0; a < CELLS; a++) begin : g_place
    if (is_data_cell(a, N_DIM, M_SIZE)) begin : g_data
      assign placed[a] = data[data_index(a, N_DIM, M_SIZE)];
    end else begin : g_zero
      assign placed[a] = 1'b0;
    end
  end

  // Stage k+1 adds the parity digits of axis k to stage k.
  for (genvar k = 0; k < N_DIM; k++) begin : g_axis
    logic [CELLS-1:0] prev, nxt;
    if (k == 0) begin : g_first
      assign prev = placed;
    end else begin : g_chain
      assign prev = g_axis[k-1].nxt;
    end
    for (genvar a = 0; a < CELLS; a++) begin : g_cell
      if (digit(a, k, M_SIZE) == M_SIZE - 1) begin : g_par
        localparam int unsigned L = line_index(a, k, M_SIZE);
        logic [M_SIZE-2:0] members;
        for (genvar i = 0; i < M_SIZE - 1; i++) begin : g_mem
          assign members[i] = prev[line_cell(L, k, i, M_SIZE)];
        end
        assign nxt[a] = ^members;
      end else begin : g_pass
        assign nxt[a] = prev[a];
      end
    end
  end

  assign cube = g_axis[N_DIM-1].nxt;

endmodule
