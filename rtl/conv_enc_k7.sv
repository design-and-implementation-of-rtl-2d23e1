// conv_enc_k7: the rate-1/2, constraint length 7 convolutional encoder of
// the FEC stage.
//
// Seven register stages M6 .. M0 hold the message window; the incoming bit
// enters M6 (the register reads 1000000 after the first 1, 1100000 after the
// second) and the older bits move towards M0. Two modulo-2 adders form
// X1 = M6 ^ M5 ^ M4 ^ M3 ^ M0 and X2 = M6 ^ M4 ^ M3 ^ M1 ^ M0, the generators
// known as octal 171 and 133. The output switch sends X1, then X2, for every
// message bit. The register starts at 0000000 after reset.
//
// Interface and timing are those of fec_encoder: one message bit per two
// clocks in steady state, one code bit per clock on out_bit, first code bit
// two clocks after its message bit is taken. window[6] is M6. The tap
// equations and the output order follow the original design, which gives the
// second output without inversion (unlike some standard uses of this code
// that invert it); this encoder has no inversion. The handshake and
// the single clock are this design's choices.
module conv_enc_k7
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        a,          // message bit
  output logic [6:0]  window,     // shift register M6..M0
  output logic        code_valid,
  output logic        x,          // first coded bit X1
  output logic        y,          // second coded bit X2
  output logic        out_valid,
  output logic        out_bit,
  output enc_status_t status
);

  localparam logic [K7-1:0] GEN [2] = '{G_K7_X1, G_K7_X2};

  logic [1:0] code;

  fec_encoder #(.K(K7), .N(2), .GEN(GEN)) u_enc (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_bit     (a),
    .window     (window),
    .code_valid (code_valid),
    .code       (code),
    .out_valid  (out_valid),
    .out_bit    (out_bit),
    .status     (status)
  );

  assign x = code[0];
  assign y = code[1];

endmodule
