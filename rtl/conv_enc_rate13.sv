// conv_enc_rate13: the example rate-1/3 convolutional code, three parity
// streams from a message bit M[n] and two delay stages.
//
// pa0[n] = M[n] ^ M[n-1] ^ M[n-2], pa1[n] = M[n] ^ M[n-1] and
// pa2[n] = M[n] ^ M[n-2] (generators 111, 110 and 101). They are stored as
// the parallel code word {pa2, pa1, pa0} and multiplexed onto one serial
// stream in the order pa0, pa1, pa2, giving three code bits per message bit.
// The delay stages start at zero after reset.
//
// Interface and timing are those of fec_encoder with N = 3: one message bit
// per three clocks in steady state, one code bit per clock. window[2] is
// M[n]. The equations follow the original design; the serial order and the handshake
// are this design's choices.
module conv_enc_rate13
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        m,          // message bit M[n]
  output logic [2:0]  window,     // {M[n], M[n-1], M[n-2]}
  output logic        code_valid,
  output logic [2:0]  pa,         // pa[i] = pa<i>
  output logic        out_valid,
  output logic        out_bit,
  output enc_status_t status
);

  localparam logic [K3-1:0] GEN [3] = '{G_EX_PA0, G_EX_PA1, G_EX_PA2};

  fec_encoder #(.K(K3), .N(3), .GEN(GEN)) u_enc (
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
