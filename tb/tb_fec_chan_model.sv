// tb_fec_chan_model: reference model and checker for one encoder channel of
// fec_top, used by tb_fec_top.
//
// It watches a channel's input handshake and keeps the accepted message bits,
// m(0) being the newest. CODE selects which set of code equations, written out
// by hand, gives the expected code bits: 0 the K=3 code (X1 = M0^M1^M2,
// X2 = M0^M2), 1 the K=7 code (X1 = M6^M5^M4^M3^M0, X2 = M6^M4^M3^M1^M0, M6
// newest), 2 the example rate-1/2 code (111, 110), 3 the example rate-1/3
// code (111, 110, 101). It checks the shift register contents before every
// clock edge and every serial output bit in order, and counts the events the
// end-to-end test must see: input stalls, code bits leaving back to back, and
// the flags. clear drops the history, as a reset of the channel does.
module tb_fec_chan_model #(
  parameter int K = 3,
  parameter int N = 2,
  parameter int CODE = 0
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_valid,
  input  logic         in_ready,
  input  logic         in_bit,
  input  logic [K-1:0] window,
  input  logic         out_valid,
  input  logic         out_bit,
  input  logic [2:0]   status,
  output int           checks,
  output int           failures,
  output int           stalls,
  output int           back_to_back,
  output int           pending,
  output int           accepted,
  output int           emitted
);

  bit hist[$];
  bit exp_bits[$];
  bit prev_out = 1'b0;

  initial begin
    checks = 0;
    failures = 0;
    stalls = 0;
    back_to_back = 0;
    accepted = 0;
    emitted = 0;
  end

  assign pending = exp_bits.size();

  function automatic bit m(int i);
    return (i < hist.size()) ? hist[i] : 1'b0;
  endfunction

  function automatic logic [2:0] ref_code();
    logic [2:0] c = '0;
    case (CODE)
      0: begin
        c[0] = m(0) ^ m(1) ^ m(2);
        c[1] = m(0) ^ m(2);
      end
      1: begin
        c[0] = m(0) ^ m(1) ^ m(2) ^ m(3) ^ m(6);
        c[1] = m(0) ^ m(2) ^ m(3) ^ m(5) ^ m(6);
      end
      2: begin
        c[0] = m(0) ^ m(1) ^ m(2);
        c[1] = m(0) ^ m(1);
      end
      default: begin
        c[0] = m(0) ^ m(1) ^ m(2);
        c[1] = m(0) ^ m(1);
        c[2] = m(0) ^ m(2);
      end
    endcase
    return c;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL code %0d at %0t: %s", CODE, $time, what);
    end
  endtask

  always @(posedge clk) begin
    if (reset) begin
      hist.delete();
      exp_bits.delete();
      prev_out = 1'b0;
    end else begin
      logic [K-1:0] w;
      for (int i = 0; i < K; i++) w[K-1-i] = m(i);
      check(window == w, $sformatf("window %b, expected %b", window, w));
      if (in_valid && !in_ready) stalls++;
      if (status[2]) check(accepted > 0, "flag before any shift");
      if (status[0]) check(emitted > 0 || out_valid, "op_ready before any output");
      if (out_valid) begin
        emitted++;
        if (prev_out) back_to_back++;
        check(exp_bits.size() > 0, "code bit without a message bit");
        if (exp_bits.size() > 0) begin
          check(out_bit == exp_bits[0],
                $sformatf("serial bit %0b, expected %0b", out_bit, exp_bits[0]));
          void'(exp_bits.pop_front());
        end
      end
      prev_out = out_valid;
      if (in_valid && in_ready) begin
        logic [2:0] c;
        accepted++;
        hist.push_front(in_bit);
        c = ref_code();
        for (int i = 0; i < N; i++) exp_bits.push_back(c[i]);
      end
    end
  end

endmodule
