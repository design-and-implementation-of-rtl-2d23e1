// tb_conv_shift_xor: self-checking testbench for the shift register and
// modulo-2 adder network.
//
// Two instances are driven with the same random message bits and random
// downstream stalls: one at the default parameters (K=3, generators 111 and
// 101) and one set up as the K=7 code (generators 1111001 and 1011011, i.e.
// X1 = M6^M5^M4^M3^M0, X2 = M6^M4^M3^M1^M0). A reference keeps the accepted
// bits and forms each code word from the equations written out by hand. It
// checks the window after every shift, each code word in order, that a word
// held back by code_ready does not change, that a new bit is taken in the same
// clock as its word leaves the register, and that a held-back word blocks a
// second new bit (back-pressure). A watchdog ends a hung run.
module tb_conv_shift_xor;
  import fec_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic in_valid = 1'b0;
  logic in_bit = 1'b0;
  logic code_ready = 1'b0;

  logic       rdy3, cv3;
  logic [2:0] win3;
  logic [1:0] code3;
  logic       rdy7, cv7;
  logic [6:0] win7;
  logic [1:0] code7;

  int checks = 0;
  int failures = 0;
  int stalls = 0;
  int held = 0;

  always #5 clk = ~clk;

  conv_shift_xor dut3 (
    .clk (clk), .reset (reset),
    .in_valid (in_valid), .in_ready (rdy3), .in_bit (in_bit),
    .window (win3),
    .code_valid (cv3), .code_ready (code_ready), .code (code3)
  );

  localparam logic [6:0] G7 [2] = '{7'b1111001, 7'b1011011};

  conv_shift_xor #(.K(7), .N(2), .GEN(G7)) dut7 (
    .clk (clk), .reset (reset),
    .in_valid (in_valid && rdy3), .in_ready (rdy7), .in_bit (in_bit),
    .window (win7),
    .code_valid (cv7), .code_ready (code_ready), .code (code7)
  );

  bit hist[$];
  logic [1:0] exp3[$];
  logic [1:0] exp7[$];
  logic [1:0] last3;
  bit held3 = 1'b0;

  function automatic bit m(int i);
    return (i < hist.size()) ? hist[i] : 1'b0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (!reset) begin
      logic [2:0] w3;
      logic [6:0] w7;
      for (int i = 0; i < 3; i++) w3[2-i] = m(i);
      for (int i = 0; i < 7; i++) w7[6-i] = m(i);
      check(win3 == w3, $sformatf("K=3 window %b, expected %b", win3, w3));
      check(win7 == w7, $sformatf("K=7 window %b, expected %b", win7, w7));
      check(rdy3 == rdy7, "both instances ready together");
      if (held3) check(cv3 && code3 == last3, "held code word changed");
      held3 = cv3 && !code_ready;
      last3 = code3;
      if (held3) held++;
      if (in_valid && !rdy3) stalls++;
      if (cv3 && code_ready) begin
        check(exp3.size() > 0 && code3 == exp3[0],
              $sformatf("K=3 code %b, expected %b", code3, exp3[0]));
        check(exp7.size() > 0 && cv7 && code7 == exp7[0],
              $sformatf("K=7 code %b, expected %b", code7, exp7[0]));
        void'(exp3.pop_front());
        void'(exp7.pop_front());
      end
      if (in_valid && rdy3) begin
        hist.push_front(in_bit);
        exp3.push_back({m(0) ^ m(2), m(0) ^ m(1) ^ m(2)});
        exp7.push_back({m(0) ^ m(2) ^ m(3) ^ m(5) ^ m(6),
                        m(0) ^ m(1) ^ m(2) ^ m(3) ^ m(6)});
      end
    end
  end

  initial begin : main
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(win3 == '0 && win7 == '0 && !cv3 && !cv7, "state after reset");
    // Full speed with the consumer always ready: one bit per clock.
    code_ready = 1'b1;
    for (int i = 0; i < 50; i++) begin
      in_valid = 1'b1;
      in_bit = 1'($urandom);
      @(negedge clk);
      check(rdy3, "ready every clock when nothing is held");
    end
    // Random producer and consumer.
    for (int i = 0; i < 2000; i++) begin
      in_valid = 1'($urandom % 4 != 0);
      in_bit = 1'($urandom);
      code_ready = 1'($urandom % 3 != 0);
      @(negedge clk);
    end
    in_valid = 1'b0;
    code_ready = 1'b1;
    repeat (5) @(negedge clk);
    check(exp3.size() == 0 && exp7.size() == 0, "every accepted bit gave a code word");
    check(stalls > 0, "back-pressure never happened");
    check(held > 0, "a held code word never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
