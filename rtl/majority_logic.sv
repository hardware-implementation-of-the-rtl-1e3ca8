// Majority correction circuit.
//
// Every digit lies on n parity lines, one per axis. For each cell the circuit
// counts how many of its n lines failed their parity check and inverts the
// digit when that count reaches the threshold thr (count >= thr). A high
// threshold corrects only digits that are very likely wrong; a low one
// corrects more but risks wrong corrections, which is why the decoder runs
// this circuit repeatedly with a schedule of thresholds.
//
// Inputs: the current cube, the line syndromes from dec_parity_check and the
// threshold of the current pass. Outputs: corrected cube and the mask of
// inverted cells. Purely combinational: one n-input population count and one
// comparator per cell. The count-and-compare rule follows the decoding
// method; reading "exceeds the threshold" as count >= thr is this design's
// interpretation (with n = 4 a threshold of 4 could not fire otherwise).
module majority_logic
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM  = N_DIM_DEF,
  parameter int unsigned M_SIZE = M_SIZE_DEF,
  localparam int unsigned CELLS = ipow(M_SIZE, N_DIM),
  localparam int unsigned LINES = ipow(M_SIZE, N_DIM - 1),
  localparam int unsigned TW    = cnt_width(N_DIM)
) (
  input  logic [CELLS-1:0]       cube,
  input  logic [N_DIM*LINES-1:0] syn,
  input  logic [TW-1:0]          thr,
  output logic [CELLS-1:0]       corr,
  output logic [CELLS-1:0]       flip
);

  for (genvar a = 0; a < CELLS; a++) begin : g_cell
    logic [N_DIM-1:0] fails;
    logic [TW-1:0]    cnt;
    for (genvar k = 0; k < N_DIM; k++) begin : g_axis
      assign fails[k] = syn[k*LINES + line_index(a, k, M_SIZE)];
    end
    always_comb begin
      cnt = '0;
      for (int unsigned k = 0; k < N_DIM; k++) cnt = cnt + TW'(fails[k]);
    end
    assign flip[a] = (cnt >= thr);
    assign corr[a] = cube[a] ^ flip[a];
  end

endmodule
