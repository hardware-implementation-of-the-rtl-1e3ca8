// 4D5 torus knot codec chip with its test-system error source.
//
// The chip holds an encoder and a decoder that work independently, each with
// its own serial handshaked input and output, as on the reference 4D5 chip
// (50 MHz clock, 50 Mbit/s serial I/O, 625-bit blocks carrying 256 data
// bits). Next to them sits the random error adder of the test system (a
// 17-stage m-sequence generator), with its own ports, so a test bench can
// route encoder output -> error adder -> decoder input.
//
// All three share clk and the active-low synchronous reset rst_n.
module tkc_top
  import tkc_pkg::*;
#(
  parameter int unsigned N_DIM    = N_DIM_DEF,
  parameter int unsigned M_SIZE   = M_SIZE_DEF,
  parameter int unsigned NUM_ITER = 7,
  parameter logic [4*NUM_ITER-1:0] THRESH = {4'd3, 4'd4, 4'd2, 4'd3, 4'd4, 4'd3, 4'd4},
  parameter int unsigned SLICES   = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // encoder
  input  logic        enc_in_valid,
  output logic        enc_in_ready,
  input  logic        enc_in_data,
  output logic        enc_out_valid,
  input  logic        enc_out_ready,
  output logic        enc_out_data,
  // decoder
  input  logic        dec_in_valid,
  output logic        dec_in_ready,
  input  logic        dec_in_data,
  output logic        dec_out_valid,
  input  logic        dec_out_ready,
  output logic        dec_out_data,
  // test-system error adder
  input  logic        err_adv,
  input  logic [16:0] err_ber_thr,
  input  logic        err_ch_in,
  output logic        err_ch_out,
  output logic        err_flag
);

  tkc_encoder #(.N_DIM(N_DIM), .M_SIZE(M_SIZE)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_data(enc_out_data)
  );

  tkc_decoder #(.N_DIM(N_DIM), .M_SIZE(M_SIZE), .NUM_ITER(NUM_ITER),
                .THRESH(THRESH), .SLICES(SLICES)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_data(dec_in_data),
    .out_valid(dec_out_valid), .out_ready(dec_out_ready), .out_data(dec_out_data)
  );

  mseq_error_gen #(.STAGES(17), .TAP(14)) u_err (
    .clk, .rst_n, .adv(err_adv), .ber_thr(err_ber_thr),
    .ch_in(err_ch_in), .ch_out(err_ch_out), .err(err_flag)
  );

endmodule
