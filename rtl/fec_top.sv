// fec_top: forward error correction encoders for an OQPSK transmitter.
//
// The FEC stage adds redundancy with a rate-1/2 convolutional encoder; two
// versions are designed, with constraint length K=3 (generators 7, 5) and
// K=7 (generators 171, 133 octal). Both are placed here side by side, each
// with its own message input and serial code output, so either can feed the
// modulator. Next to them stand the two small example codes used to explain
// convolutional coding: a rate-1/2 code with generators 111 / 110 and a
// rate-1/3 code with generators 111 / 110 / 101.
//
// All four channels share clk and the synchronous, active-high reset and
// are otherwise independent. Each takes a message bit on <ch>_in_valid /
// <ch>_in_ready / <ch>_in_bit, shows its shift register and parallel code word,
// and sends its code bits one per clock on <ch>_out_valid / <ch>_out_bit: two
// code bits per message bit for the rate-1/2 channels, three for the rate-1/3
// channel. The first code bit of a message bit leaves two clocks after the
// bit is taken. The OQPSK modulator itself is outside this design; the serial
// outputs are where it connects. Sharing one clock among the channels is this
// design's choice.
module fec_top
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        reset,

  // K=3, rate 1/2 encoder
  input  logic        k3_in_valid,
  output logic        k3_in_ready,
  input  logic        k3_in_bit,
  output logic [2:0]  k3_window,
  output logic        k3_code_valid,
  output logic        k3_x,
  output logic        k3_y,
  output logic        k3_out_valid,
  output logic        k3_out_bit,
  output enc_status_t k3_status,

  // K=7, rate 1/2 encoder
  input  logic        k7_in_valid,
  output logic        k7_in_ready,
  input  logic        k7_in_bit,
  output logic [6:0]  k7_window,
  output logic        k7_code_valid,
  output logic        k7_x,
  output logic        k7_y,
  output logic        k7_out_valid,
  output logic        k7_out_bit,
  output enc_status_t k7_status,

  // example rate 1/2 code (pa0, pa1)
  input  logic        ex2_in_valid,
  output logic        ex2_in_ready,
  input  logic        ex2_in_bit,
  output logic [2:0]  ex2_window,
  output logic        ex2_code_valid,
  output logic [1:0]  ex2_pa,
  output logic        ex2_out_valid,
  output logic        ex2_out_bit,
  output enc_status_t ex2_status,

  // example rate 1/3 code (pa0, pa1, pa2)
  input  logic        ex3_in_valid,
  output logic        ex3_in_ready,
  input  logic        ex3_in_bit,
  output logic [2:0]  ex3_window,
  output logic        ex3_code_valid,
  output logic [2:0]  ex3_pa,
  output logic        ex3_out_valid,
  output logic        ex3_out_bit,
  output enc_status_t ex3_status
);

  conv_enc_k3 u_k3 (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (k3_in_valid),
    .in_ready   (k3_in_ready),
    .a          (k3_in_bit),
    .window     (k3_window),
    .code_valid (k3_code_valid),
    .x          (k3_x),
    .y          (k3_y),
    .out_valid  (k3_out_valid),
    .out_bit    (k3_out_bit),
    .status     (k3_status)
  );

  conv_enc_k7 u_k7 (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (k7_in_valid),
    .in_ready   (k7_in_ready),
    .a          (k7_in_bit),
    .window     (k7_window),
    .code_valid (k7_code_valid),
    .x          (k7_x),
    .y          (k7_y),
    .out_valid  (k7_out_valid),
    .out_bit    (k7_out_bit),
    .status     (k7_status)
  );

  conv_enc_fig2 u_ex2 (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (ex2_in_valid),
    .in_ready   (ex2_in_ready),
    .m          (ex2_in_bit),
    .window     (ex2_window),
    .code_valid (ex2_code_valid),
    .pa         (ex2_pa),
    .out_valid  (ex2_out_valid),
    .out_bit    (ex2_out_bit),
    .status     (ex2_status)
  );

  conv_enc_rate13 u_ex3 (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (ex3_in_valid),
    .in_ready   (ex3_in_ready),
    .m          (ex3_in_bit),
    .window     (ex3_window),
    .code_valid (ex3_code_valid),
    .pa         (ex3_pa),
    .out_valid  (ex3_out_valid),
    .out_bit    (ex3_out_bit),
    .status     (ex3_status)
  );

endmodule
