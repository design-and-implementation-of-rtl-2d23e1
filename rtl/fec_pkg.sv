// fec_pkg: constants and types shared by the convolutional encoders.
//
// Generator convention used throughout: a generator of constraint length K is
// a K-bit vector g, and code bit i is the XOR of window[j] for every j where
// g[j] is 1. window[K-1] is the newest message bit M[n] and window[0] the
// oldest, M[n-K+1]. The constants are the generators given by the equations
// of the design:
//   K=3 main code     X1 = M0^M1^M2 (G1=111=7), X2 = M0^M2 (G2=101=5)
//   K=7 main code     X1 = M6^M5^M4^M3^M0, X2 = M6^M4^M3^M1^M0, with M6 the
//                     newest bit (the register value 1000000 after the first
//                     1 is shifted in); these are the octal 171 / 133 codes
//   example rate 1/2  pa0 = M[n]^M[n-1]^M[n-2], pa1 = M[n]^M[n-1]
//   example rate 1/3  pa0 as above, pa1 as above, pa2 = M[n]^M[n-2]
package fec_pkg;

  localparam int unsigned K3 = 3;
  localparam int unsigned K7 = 7;

  localparam logic [K3-1:0] G_K3_X1 = 3'b111;
  localparam logic [K3-1:0] G_K3_X2 = 3'b101;

  localparam logic [K7-1:0] G_K7_X1 = 7'b1111001;
  localparam logic [K7-1:0] G_K7_X2 = 7'b1011011;

  localparam logic [K3-1:0] G_EX_PA0 = 3'b111;
  localparam logic [K3-1:0] G_EX_PA1 = 3'b110;
  localparam logic [K3-1:0] G_EX_PA2 = 3'b101;

  // Progress flags of one encoder channel. Each is sticky from its first
  // event until reset.
  typedef struct packed {
    logic flag;      // shift register has taken its first message bit
    logic flag1;     // XOR network has produced its first code word
    logic op_ready;  // first code bit has been put on the serial output
  } enc_status_t;

endpackage
