// nDm torus knot code encoder (4D5 by default).
//
// Data path: serial data bits are collected in the input shift register.
// When a whole block of (m-1)**n bits is in, it is handed in parallel to the
// parity calculation circuit, and the complete m**n-bit code cube (data and
// parity digits) is written in one clock into the output torus-connected
// shift register, whose cell wiring sends the cube out in torus knot order.
// While one block is being read out the next one can be collected.
//
// Interface: serial in and out, each with a valid/ready handshake (a bit
// moves on a clock edge where both are high). in_ready falls once a full
// block waits for the output register; out_valid stays high, with out_data
// stable, until out_ready takes the bit.
//
// Timing: the block is transferred on the clock after its last data bit is
// accepted if the output register is free (or frees in that cycle), and its
// first code bit is on out_data right after; read-out then takes m**n
// cycles. So the encoder sustains one block per m**n clocks, the
// read-out-bound rate of the reference chip's time chart. The handshakes,
// the one-cycle transfer and the data-bit placement are this design's
// choices; the structure follows the reference architecture.
module tkc_encoder
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM  = N_DIM_DEF,
  parameter int unsigned M_SIZE = M_SIZE_DEF,
  localparam int unsigned CELLS = ipow(M_SIZE, N_DIM),
  localparam int unsigned DATA  = ipow(M_SIZE - 1, N_DIM)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_data,
  output logic out_valid,
  input  logic out_ready,
  output logic out_data
);

  localparam int unsigned IW = cnt_width(DATA);
  localparam int unsigned OW = cnt_width(CELLS);

  logic [IW-1:0]    in_cnt;    // data bits held in the input register
  logic [OW-1:0]    out_cnt;   // code bits still to send
  logic [DATA-1:0]  blk;
  logic [CELLS-1:0] cube;
  logic [CELLS-1:0] unused_q;
  logic             in_acc, out_acc, xfer;

  assign in_ready  = (in_cnt != IW'(DATA));
  assign in_acc    = in_valid && in_ready;
  assign out_valid = (out_cnt != '0);
  assign out_acc   = out_valid && out_ready;
  assign xfer      = (in_cnt == IW'(DATA)) &&
                     ((out_cnt == '0) || ((out_cnt == OW'(1)) && out_ready));

  input_shift_reg #(.W(DATA)) u_in (
    .clk, .rst_n, .shift_en(in_acc), .ser_in(in_data), .q(blk)
  );

  enc_parity_calc #(.N_DIM(N_DIM), .M_SIZE(M_SIZE)) u_par (
    .data(blk), .cube
  );

  torus_shift_reg #(.N_DIM(N_DIM), .M_SIZE(M_SIZE)) u_out (
    .clk, .rst_n,
    .shift_en(out_acc), .ser_in(1'b0),
    .load_en({CELLS{xfer}}), .load_d(cube),
    .q(unused_q), .ser_out(out_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cnt  <= '0;
      out_cnt <= '0;
    end else begin
      if (xfer)        in_cnt <= '0;
      else if (in_acc) in_cnt <= in_cnt + IW'(1);
      if (xfer)         out_cnt <= OW'(CELLS);
      else if (out_acc) out_cnt <= out_cnt - OW'(1);
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_in_bound: assert property (@(posedge clk) disable iff (!rst_n)
    in_cnt <= IW'(DATA));

endmodule
