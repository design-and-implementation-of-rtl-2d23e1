// tb_code_serializer: self-checking testbench for the output commutator.
//
// Runs the default two-bit serializer and a three-bit one side by side. A
// producer offers random words, sometimes every clock and sometimes with
// gaps; the reference queues each word as it is taken and expects its bits on
// the serial output lowest index first. It also checks that a word offered
// while the output is idle or finishing is taken at once, so that back-to-back
// words leave with no gap, and that the output goes idle when the words stop.
module tb_code_serializer;

  logic clk = 1'b0;
  logic reset = 1'b1;

  logic       v2 = 1'b0, r2, ov2, ob2;
  logic [1:0] w2 = '0;
  logic       v3 = 1'b0, r3, ov3, ob3;
  logic [2:0] w3 = '0;

  int checks = 0;
  int failures = 0;
  int b2b = 0;

  always #5 clk = ~clk;

  code_serializer dut2 (
    .clk (clk), .reset (reset),
    .word_valid (v2), .word_ready (r2), .word (w2),
    .out_valid (ov2), .out_bit (ob2)
  );

  code_serializer #(.N(3)) dut3 (
    .clk (clk), .reset (reset),
    .word_valid (v3), .word_ready (r3), .word (w3),
    .out_valid (ov3), .out_bit (ob3)
  );

  bit q2[$];
  bit q3[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (!reset) begin
      check(r2 == (q2.size() <= 1), "N=2 ready exactly when idle or on the last bit");
      check(r3 == (q3.size() <= 1), "N=3 ready exactly when idle or on the last bit");
      check(ov2 == (q2.size() > 0), "N=2 busy while bits remain");
      if (ov2) begin
        check(q2.size() > 0 && ob2 == q2[0], "N=2 serial bit");
        if (q2.size() > 0) void'(q2.pop_front());
      end
      if (ov3) begin
        check(q3.size() > 0 && ob3 == q3[0], "N=3 serial bit");
        if (q3.size() > 0) void'(q3.pop_front());
      end
      if (v2 && r2) begin
        if (ov2) b2b++;
        for (int i = 0; i < 2; i++) q2.push_back(w2[i]);
      end
      if (v3 && r3) for (int i = 0; i < 3; i++) q3.push_back(w3[i]);
    end
  end

  initial begin : main
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(!ov2 && !ov3 && r2 && r3, "idle after reset");
    // Known words: 2'b10 must come out as 0 then 1.
    v2 = 1'b1; w2 = 2'b10;
    @(negedge clk);
    v2 = 1'b0;
    check(ov2 && ob2 == 1'b0, "first bit is word[0]");
    @(negedge clk);
    check(ov2 && ob2 == 1'b1, "second bit is word[1]");
    @(negedge clk);
    check(!ov2, "idle after one word");
    for (int i = 0; i < 1500; i++) begin
      v2 = (i < 700) ? 1'b1 : 1'($urandom % 3 == 0);
      v3 = 1'($urandom % 2 == 0);
      w2 = 2'($urandom);
      w3 = 3'($urandom);
      @(negedge clk);
    end
    v2 = 1'b0;
    v3 = 1'b0;
    repeat (6) @(negedge clk);
    check(q2.size() == 0 && q3.size() == 0, "all bits sent");
    check(!ov2 && !ov3, "idle at the end");
    check(b2b > 100, "back-to-back words never happened");
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
