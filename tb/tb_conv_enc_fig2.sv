// tb_conv_enc_fig2: self-checking testbench for conv_enc_fig2.
//
// Checks the example rate-1/2 code pa0 = M[n]^M[n-1]^M[n-2],
// pa1 = M[n]^M[n-1].
// The reference model keeps the history of accepted message bits, m(0) the
// newest, and computes each code bit from the code equations written out by
// hand, independently of the generator constants used by the RTL. It checks
// the serial stream bit by bit, the shift register contents after every shift,
// each parallel code word (in the slow phases, where every word stands alone
// for exactly one clock), the progress flags, the steady-state rate of one
// message bit per N clocks with an unbroken output stream, the two-clock
// latency from an accepted bit to its first code bit, and a reset in the middle
// of a stream. A watchdog ends the run if it hangs.
module tb_conv_enc_fig2;
  import fec_pkg::*;

  localparam int K = 3;
  localparam int N = 2;

  logic         clk = 1'b0;
  logic         reset = 1'b1;
  logic         in_valid = 1'b0;
  logic         in_bit = 1'b0;
  logic         in_ready;
  logic [K-1:0] window;
  logic         code_valid;
  logic [N-1:0] code;
  logic         out_valid;
  logic         out_bit;
  enc_status_t  status;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;

  conv_enc_fig2 dut (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .m          (in_bit),
    .window     (window),
    .code_valid (code_valid),
    .pa         (code),
    .out_valid  (out_valid),
    .out_bit    (out_bit),
    .status     (status)
  );

  // ---------------- reference model ----------------
  bit hist[$];            // accepted message bits, hist[0] the newest
  bit exp_bits[$];        // serial code bits still expected
  logic [N-1:0] exp_words[$];
  bit out_log[$];         // every serial bit seen since the last clear
  int acc_cycles[$];      // cycles at which message bits were accepted
  int out_cycles[$];      // cycles at which a code bit was on the output
  bit slow_phase = 1'b0;
  int stalls = 0;

  function automatic bit m(int i);
    return (i < hist.size()) ? hist[i] : 1'b0;
  endfunction

  function automatic logic [N-1:0] ref_code();
    logic [N-1:0] c;
    c[0] = m(0) ^ m(1) ^ m(2);          // pa0 = M[n]^M[n-1]^M[n-2]
    c[1] = m(0) ^ m(1);                 // pa1 = M[n]^M[n-1]
    return c;
  endfunction

  function automatic logic [K-1:0] ref_window();
    logic [K-1:0] w;
    for (int i = 0; i < K; i++) w[K-1-i] = m(i);
    return w;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Samples the values in force just before each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset) begin
      check(window == ref_window(),
            $sformatf("window %b, expected %b", window, ref_window()));
      if (in_valid && !in_ready) stalls++;
      if (code_valid && slow_phase) begin
        check(exp_words.size() > 0, "code word without a message bit");
        if (exp_words.size() > 0) begin
          check(code == exp_words[0],
                $sformatf("code word %b, expected %b", code, exp_words[0]));
          void'(exp_words.pop_front());
        end
      end
      if (out_valid) begin
        out_cycles.push_back(cycle);
        out_log.push_back(out_bit);
        check(exp_bits.size() > 0, "code bit without a message bit");
        if (exp_bits.size() > 0) begin
          check(out_bit == exp_bits[0],
                $sformatf("serial bit %0b, expected %0b", out_bit, exp_bits[0]));
          void'(exp_bits.pop_front());
        end
      end
      if (in_valid && in_ready) begin
        logic [N-1:0] c;
        hist.push_front(in_bit);
        acc_cycles.push_back(cycle);
        c = ref_code();
        if (slow_phase) exp_words.push_back(c);
        for (int i = 0; i < N; i++) exp_bits.push_back(c[i]);
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  // Called and returning at a falling edge.
  task automatic send_bit(bit b, int gap);
    in_valid = 1'b1;
    in_bit   = b;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    if (gap > 0) begin
      in_valid = 1'b0;
      repeat (gap - 1) @(negedge clk);
    end
  endtask

  task automatic drain();
    in_valid = 1'b0;
    for (int i = 0; i < 40 && exp_bits.size() > 0; i++) @(negedge clk);
    repeat (2) @(negedge clk);
    check(exp_bits.size() == 0,
          $sformatf("%0d code bits never came out", exp_bits.size()));
    check(out_valid == 1'b0, "output still busy after the stream ended");
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset    = 1'b1;
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    hist.delete();
    exp_bits.delete();
    exp_words.delete();
    out_log.delete();
    check(window == '0, "window not cleared by reset");
    check(status == '0, "flags not cleared by reset");
    check(out_valid == 1'b0 && code_valid == 1'b0, "output busy after reset");
  endtask

  // Sends a vector, most significant character first, spaced so that each
  // word stands alone, and compares the serial output with a known code.
  task automatic run_vector(string msg, string code_str);
    slow_phase = 1'b1;
    for (int i = 0; i < msg.len(); i++) send_bit(msg[i] == "1", N + 4);
    drain();
    check(out_log.size() == code_str.len(),
          $sformatf("%0d code bits for %0d expected", out_log.size(), code_str.len()));
    for (int i = 0; i < code_str.len() && i < out_log.size(); i++)
      check(out_log[i] == (code_str[i] == "1"),
            $sformatf("vector %s: code bit %0d is %0b", msg, i, out_log[i]));
    slow_phase = 1'b0;
  endtask

  // ---------------- test sequence ----------------
  initial begin : main
    int first_out;
    int span;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(status == '0 && window == '0, "state after reset");

    // Flags: nothing before the first bit, then shift, XOR, output in turn.
    slow_phase = 1'b1;
    @(negedge clk);
    in_valid = 1'b1;
    in_bit   = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check(status.flag && !status.flag1 && !status.op_ready, "flag after first shift");
    @(negedge clk);
    check(status.flag1 && code_valid && !status.op_ready, "flag1 with first code word");
    @(negedge clk);
    check(status.op_ready && out_valid, "op_ready with first output bit (latency 2)");
    drain();
    check(status == 3'b111, "flags stay up");
    slow_phase = 1'b0;

    do_reset();
    run_vector("01111011", "0011001010010100");

    // Random message bits with random gaps, then a reset halfway.
    do_reset();
    slow_phase = 1'b1;
    for (int i = 0; i < 40; i++) send_bit(1'($urandom), N + 3 + int'($urandom % 3));
    drain();
    slow_phase = 1'b0;
    for (int i = 0; i < 200; i++) send_bit(1'($urandom), int'($urandom % 3));
    for (int i = 0; i < 9; i++) send_bit(1'($urandom), 0);
    do_reset();  // mid-stream: bits in flight are dropped
    for (int i = 0; i < 60; i++) send_bit(1'($urandom), 0);
    drain();

    // Rate: with a message bit offered every clock, bits are taken one per
    // N clocks in steady state and the code stream has no gap.
    do_reset();
    acc_cycles.delete();
    out_cycles.delete();
    for (int i = 0; i < 64; i++) send_bit(1'($urandom), 0);
    drain();
    for (int i = 4; i < acc_cycles.size(); i++)
      check(acc_cycles[i] - acc_cycles[i-1] == N,
            $sformatf("message bits %0d clocks apart", acc_cycles[i] - acc_cycles[i-1]));
    check(out_cycles.size() == 64 * N, "code bits per message bit");
    first_out = out_cycles[0];
    span = out_cycles[out_cycles.size()-1] - first_out + 1;
    check(span == 64 * N, $sformatf("output stream has gaps: %0d clocks for %0d bits", span, 64 * N));
    check(first_out - acc_cycles[0] == 3, "first code bit two clocks after its edge");
    check(stalls > 0, "back-pressure on the input never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
