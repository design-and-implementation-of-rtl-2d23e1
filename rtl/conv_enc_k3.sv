// conv_enc_k3: the rate-1/2, constraint length 3 convolutional encoder of
// the FEC stage.
//
// Three register stages M0 (the incoming bit), M1 and M2 feed two modulo-2
// adders: X1 = M0 ^ M1 ^ M2 (generator 111 = 7) and X2 = M0 ^ M2 (generator
// 101 = 5). For every message bit the switch at the output sends X1, then X2,
// so the 8-bit message 01111011 becomes the 16-bit code word
// 00 11 01 10 10 01 00 01. The register starts at 000 after reset.
//
// Interface and timing are those of fec_encoder: one message bit per two
// clocks in steady state, one code bit per clock on out_bit, first code bit
// two clocks after its message bit is taken. window[2] is M0, the newest bit,
// and window[0] is M2. The generators and the output order follow the original design;
// the handshake and the single clock are this design's choices.
module conv_enc_k3
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        a,          // message bit
  output logic [2:0]  window,     // shift register contents, newest at [2]
  output logic        code_valid,
  output logic        x,          // first coded bit X1
  output logic        y,          // second coded bit X2
  output logic        out_valid,
  output logic        out_bit,
  output enc_status_t status
);

  localparam logic [K3-1:0] GEN [2] = '{G_K3_X1, G_K3_X2};

  logic [1:0] code;

  fec_encoder #(.K(K3), .N(2), .GEN(GEN)) u_enc (
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
