// conv_shift_xor: shift register and modulo-2 adder network of a
// convolutional encoder of constraint length K and rate 1/N.
//
// The K-bit register holds the message window. Each accepted message bit
// enters at the top, window[K-1], and the older bits move one place down
// (a shift from left to right when drawn with the input on the left); window[0] is the oldest
// bit still in use. One clock after a bit is shifted in, the XOR network
// reduces the window against each generator GEN[i] and stores the N results
// in the code word register, code[0] being the first coded bit (X1 / pa0).
// The design works this way in two steps, shift first and XOR second, as the
// flag and flag1 signals of the encoder show.
//
// Interface: in_valid / in_ready / in_bit accept one message bit per clock at
// most; code_valid / code_ready / code deliver one code word per accepted bit,
// in order. Timing: a bit accepted at clock edge t appears in window after t
// and its code word is valid after edge t+1. Reset (synchronous, active high)
// clears the window to all zeros, the starting state of the code, and drops any
// word in flight. The two-step pipeline, the handshake and the reset style are
// this design's own choices; the window, generator and XOR definition follow
// the encoder equations.
module conv_shift_xor #(
  parameter int unsigned K = 3,
  parameter int unsigned N = 2,
  parameter logic [K-1:0] GEN [N] = '{3'b111, 3'b101}
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_bit,
  output logic [K-1:0] window,
  output logic         code_valid,
  input  logic         code_ready,
  output logic [N-1:0] code
);

  logic         win_new;   // window holds a bit whose code word is not made yet
  logic         xor_take;  // XOR stage captures the window this cycle
  logic         accept;
  logic [N-1:0] parity;

  assign xor_take = win_new && (!code_valid || code_ready);
  assign in_ready = !win_new || xor_take;
  assign accept   = in_valid && in_ready;

  // Modulo-2 adders: one reduction XOR per generator.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      parity[i] = ^(window & GEN[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      window     <= '0;
      win_new    <= 1'b0;
      code_valid <= 1'b0;
      code       <= '0;
    end else begin
      if (accept) begin
        window <= {in_bit, window[K-1:1]};
      end
      win_new <= accept || (win_new && !xor_take);
      if (xor_take) begin
        code <= parity;
      end
      code_valid <= xor_take || (code_valid && !code_ready);
    end
  end

  // A code word waiting downstream must not change under it.
  property p_code_stable;
    @(posedge clk) disable iff (reset)
      code_valid && !code_ready |=> code_valid && $stable(code);
  endproperty
  a_code_stable: assert property (p_code_stable);

endmodule
