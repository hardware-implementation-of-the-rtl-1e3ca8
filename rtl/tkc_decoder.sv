// nDm torus knot code decoder with iterated majority correction (4D5 by
// default).
//
// Data path: the received serial stream is shifted into a torus-connected
// shift register wired in the encoder's transmission order, so once a block
// is in, every digit sits in its own cube cell. The parity calculation
// circuit then checks every line along every axis, and the majority
// correction circuit inverts each digit whose number of failed lines reaches
// the threshold; the corrected digits are written back into the same
// register. This pass is repeated NUM_ITER times with the threshold schedule
// THRESH (4-3-4-3-2-4-3 for 4D5). Finally only the data digits are copied
// into the output shift register and sent out serially.
//
// Time division: as on the reference 4D5 chip, each pass is split into
// SLICES processes of one clock each (5 by default, so 35 clocks for seven
// passes). Process s corrects the cells whose last coordinate x(n-1) mod
// SLICES equals s, using the parities of the register as it stands, which
// already include the corrections of the earlier processes of that pass.
// SLICES = 1 gives the fully parallel one-clock pass. How the chip cut a pass
// into five, and the choice of the last axis, are this design's assumptions.
//
// Interface: serial in and out with valid/ready handshakes. in_ready is high
// only while a block is being received; it drops for the decoding clocks and
// while a decoded block waits for the output register to empty.
//
// Timing: the last received bit is accepted on edge E0, decoding occupies
// edges E1 .. E(NUM_ITER*SLICES), the transfer to the output register is the
// next edge, and the first decoded bit is valid right after it:
// NUM_ITER*SLICES + 1 clocks from the last input bit to the first output bit.
module tkc_decoder
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM    = N_DIM_DEF,
  parameter int unsigned M_SIZE   = M_SIZE_DEF,
  parameter int unsigned NUM_ITER = 7,
  // Threshold of pass i in bits [4*i +: 4]; pass 0 is the least significant.
  parameter logic [4*NUM_ITER-1:0] THRESH = {4'd3, 4'd4, 4'd2, 4'd3, 4'd4, 4'd3, 4'd4},
  parameter int unsigned SLICES   = 5,
  localparam int unsigned CELLS = ipow(M_SIZE, N_DIM),
  localparam int unsigned DATA  = ipow(M_SIZE - 1, N_DIM),
  localparam int unsigned LINES = ipow(M_SIZE, N_DIM - 1)
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

  localparam int unsigned TW = cnt_width(N_DIM);
  localparam int unsigned RW = cnt_width(CELLS);
  localparam int unsigned OW = cnt_width(DATA);
  localparam int unsigned KW = cnt_width(NUM_ITER);
  localparam int unsigned SW = cnt_width(SLICES);

  typedef enum logic [1:0] {S_RECV, S_DEC, S_XFER} state_t;

  state_t st;
  logic [RW-1:0] rx_cnt;     // bits of the current block received
  logic [KW-1:0] iter;       // current decoding pass
  logic [SW-1:0] slice;      // current process within the pass
  logic [OW-1:0] out_cnt;    // decoded bits still to send

  logic [CELLS-1:0]       q, corr, unused_flip, in_slice, load_en;
  logic [N_DIM*LINES-1:0] syn;
  logic [DATA-1:0]        dec_data;
  logic [TW-1:0]          thr;
  logic                   rx_acc, out_acc, xfer, unused_ser;

  assign in_ready  = (st == S_RECV);
  assign rx_acc    = in_valid && in_ready;
  assign out_valid = (out_cnt != '0);
  assign out_acc   = out_valid && out_ready;
  assign xfer      = (st == S_XFER) &&
                     ((out_cnt == '0) || ((out_cnt == OW'(1)) && out_ready));

  // Cells corrected by the current process.
  for (genvar a = 0; a < CELLS; a++) begin : g_slice
    localparam int unsigned SL = digit(a, N_DIM - 1, M_SIZE) % SLICES;
    assign in_slice[a] = (slice == SW'(SL));
  end

  assign load_en = (st == S_DEC) ? in_slice : '0;
  assign thr     = TW'(THRESH[4*iter +: 4]);

  torus_shift_reg #(.N_DIM(N_DIM), .M_SIZE(M_SIZE)) u_rx (
    .clk, .rst_n,
    .shift_en(rx_acc), .ser_in(in_data),
    .load_en, .load_d(corr),
    .q, .ser_out(unused_ser)
  );

  dec_parity_check #(.N_DIM(N_DIM), .M_SIZE(M_SIZE)) u_chk (
    .cube(q), .syn
  );

  majority_logic #(.N_DIM(N_DIM), .M_SIZE(M_SIZE)) u_maj (
    .cube(q), .syn, .thr, .corr, .flip(unused_flip)
  );

  // Only the data digits go to the output register.
  for (genvar j = 0; j < DATA; j++) begin : g_data
    assign dec_data[j] = q[data_addr(j, N_DIM, M_SIZE)];
  end

  output_shift_reg #(.W(DATA)) u_tx (
    .clk, .rst_n, .load(xfer), .d(dec_data), .shift_en(out_acc), .ser_out(out_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_RECV;
      rx_cnt  <= '0;
      iter    <= '0;
      slice   <= '0;
      out_cnt <= '0;
    end else begin
      unique case (st)
        S_RECV: if (rx_acc) begin
          if (rx_cnt == RW'(CELLS - 1)) begin
            rx_cnt <= '0;
            iter   <= '0;
            slice  <= '0;
            st     <= S_DEC;
          end else begin
            rx_cnt <= rx_cnt + RW'(1);
          end
        end
        S_DEC: begin
          if (slice == SW'(SLICES - 1)) begin
            slice <= '0;
            if (iter == KW'(NUM_ITER - 1)) st <= S_XFER;
            else                           iter <= iter + KW'(1);
          end else begin
            slice <= slice + SW'(1);
          end
        end
        S_XFER: if (xfer) st <= S_RECV;
        default: st <= S_RECV;
      endcase
      if (xfer)         out_cnt <= OW'(DATA);
      else if (out_acc) out_cnt <= out_cnt - OW'(1);
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_no_rx_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    st != S_RECV |-> !rx_acc);

endmodule
