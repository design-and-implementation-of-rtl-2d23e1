// fec_encoder: one complete convolutional encoder channel of rate 1/N and
// constraint length K: a serial shift
// register, modulo-2 adders on its taps, and a switch that multiplexes the
// adder outputs into one stream of output code digits.
//
// Message bits enter on in_valid / in_ready / in_bit. Each bit is shifted into
// the register (conv_shift_xor), the next clock the adders form the N-bit
// code word, which is stored and shown on code / code_valid (the X and Y
// outputs), and the commutator (code_serializer) sends it as N serial bits on
// out_valid / out_bit, first coded bit first. With a message bit offered every
// clock the channel settles to one message bit taken every N clocks and one
// code bit sent every clock. The first code bit of a message bit accepted at
// edge t is on out_bit after edge t+2.
//
// status carries the three progress flags of the original design: flag
// (shift register operation has started), flag1 (XOR operation has started)
// and op_ready (output has started). reset (synchronous, active high) clears
// the register, the flags and any bits in flight. The single clock with
// handshakes stands in for the original design's separate clocks for the shift register
// (Clk), for storing X and Y (Clk2) and for output (Clk3); that, and the
// exact moment each flag rises, are this design's choices.
module fec_encoder
  import fec_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter int unsigned N = 2,
  parameter logic [K-1:0] GEN [N] = '{G_K3_X1, G_K3_X2}
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_bit,
  output logic [K-1:0] window,
  output logic         code_valid,
  output logic [N-1:0] code,
  output logic         out_valid,
  output logic         out_bit,
  output enc_status_t  status
);

  logic word_ready;

  conv_shift_xor #(.K(K), .N(N), .GEN(GEN)) u_shift_xor (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_bit     (in_bit),
    .window     (window),
    .code_valid (code_valid),
    .code_ready (word_ready),
    .code       (code)
  );

  code_serializer #(.N(N)) u_serializer (
    .clk        (clk),
    .reset      (reset),
    .word_valid (code_valid),
    .word_ready (word_ready),
    .word       (code),
    .out_valid  (out_valid),
    .out_bit    (out_bit)
  );

  // Each flag rises with the first result of its step (the first shifted
  // window, the first stored code word, the first output bit) and stays up.
  logic flag_q, flag1_q, op_ready_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      flag_q     <= 1'b0;
      flag1_q    <= 1'b0;
      op_ready_q <= 1'b0;
    end else begin
      if (in_valid && in_ready) flag_q     <= 1'b1;
      if (code_valid)           flag1_q    <= 1'b1;
      if (out_valid)            op_ready_q <= 1'b1;
    end
  end

  assign status.flag     = flag_q;
  assign status.flag1    = flag1_q || code_valid;
  assign status.op_ready = op_ready_q || out_valid;

endmodule
