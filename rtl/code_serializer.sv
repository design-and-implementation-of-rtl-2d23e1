// code_serializer: the output commutator of the encoder.
//
// The switch drawn at the encoder output visits the N modulo-2 adder outputs
// in turn, so each code word leaves as N consecutive bits of one serial
// stream. This module loads an N-bit word and sends word[0] first, then
// word[1], up to word[N-1], one bit per clock. It takes the next word in the
// same clock as it sends the last bit of the current one, so a steady supply
// of words gives an unbroken output stream at N bits per message bit: the
// rate 1/N of the code.
//
// Interface: word_valid / word_ready / word take a word; out_valid / out_bit
// give the stream. The output has no back-pressure: the modulator after the
// encoder is taken to consume a bit every clock. Timing: a word taken at edge
// t gives its first bit after edge t. Reset is synchronous and active high.
// The order of the bits (first coded bit first) follows the reference
// encoding of the original design; the handshake is this design's choice.
module code_serializer #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         word_valid,
  output logic         word_ready,
  input  logic [N-1:0] word,
  output logic         out_valid,
  output logic         out_bit
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  shreg;   // bits still to send, next one at shreg[0]
  logic [CW-1:0] left;    // number of bits still to send, including out_bit

  assign word_ready = (left <= CW'(1));
  assign out_valid  = (left != '0);
  assign out_bit    = shreg[0];

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg <= '0;
      left  <= '0;
    end else if (word_valid && word_ready) begin
      shreg <= word;
      left  <= CW'(N);
    end else if (left != '0) begin
      shreg <= shreg >> 1;
      left  <= left - CW'(1);
    end
  end

  // The count never exceeds one word, and a word is sent without gaps.
  a_left_range: assert property (@(posedge clk) disable iff (reset)
    left <= CW'(N));
  a_no_gap: assert property (@(posedge clk) disable iff (reset)
    left > CW'(1) |=> out_valid);

endmodule
