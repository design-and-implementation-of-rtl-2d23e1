// conv_enc_fig2: the introductory example of a rate-1/2 convolutional code,
// a message bit M[n] and two delay stages M[n-1], M[n-2].
//
// The two parity streams are pa0[n] = M[n] ^ M[n-1] ^ M[n-2] and
// pa1[n] = M[n] ^ M[n-1] (generators 111 and 110). They are stored as the
// parallel code word {pa1, pa0} and also multiplexed onto one serial stream,
// pa0 first. The delay stages start at zero after reset.
//
// Interface and timing are those of fec_encoder: one message bit per two
// clocks in steady state, one code bit per clock. window[2] is M[n],
// window[0] is M[n-2]. The equations follow the original design; serialising the two
// parity streams in the same way as the main encoders, with pa0 first, and
// the handshake are this design's choices.
module conv_enc_fig2
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        m,          // message bit M[n]
  output logic [2:0]  window,     // {M[n], M[n-1], M[n-2]}
  output logic        code_valid,
  output logic [1:0]  pa,         // pa[0] = pa0, pa[1] = pa1
  output logic        out_valid,
  output logic        out_bit,
  output enc_status_t status
);

  localparam logic [K3-1:0] GEN [2] = '{G_EX_PA0, G_EX_PA1};

  fec_encoder #(.K(K3), .N(2), .GEN(GEN)) u_enc (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_bit     (m),
    .window     (window),
    .code_valid (code_valid),
    .code       (pa),
    .out_valid  (out_valid),
    .out_bit    (out_bit),
    .status     (status)
  );

endmodule
