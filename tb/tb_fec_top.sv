// tb_fec_top: end-to-end testbench of fec_top at its default (and only)
// configuration.
//
// All four encoder channels run at once, each checked by its own reference
// model (tb_fec_chan_model). The run has four parts:
//   1. every channel encodes the 8-bit message 01111011 with gaps between
//      bits; the K=3 channel's serial output is compared with the reference
//      code word 0011011010010001, and each channel's flags with the order
//      shift, XOR, output;
//   2. every channel gets a message bit offered on every clock for 300
//      bits, which exercises the input stall and the unbroken code stream;
//      the message-bit rate of one per N clocks is measured;
//   3. random traffic with random gaps is cut by a reset in mid-stream,
//      after which the channels must start again from an all-zero register;
//   4. random traffic to the end, drained and checked complete.
// Each of the mechanisms (stall, back-to-back output, flags, mid-stream
// reset) is counted, and one that never happened counts as a failure.
module tb_fec_top;
  import fec_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;

  logic [3:0] in_valid = '0;
  logic [3:0] in_bit = '0;
  logic [3:0] in_ready;
  logic [3:0] out_valid;
  logic [3:0] out_bit;
  logic [3:0] code_valid;
  logic [2:0] k3_window, ex2_window, ex3_window;
  logic [6:0] k7_window;
  logic       k3_x, k3_y, k7_x, k7_y;
  logic [1:0] ex2_pa;
  logic [2:0] ex3_pa;
  enc_status_t st [4];

  always #5 clk = ~clk;

  fec_top dut (
    .clk            (clk),
    .reset          (reset),
    .k3_in_valid    (in_valid[0]),
    .k3_in_ready    (in_ready[0]),
    .k3_in_bit      (in_bit[0]),
    .k3_window      (k3_window),
    .k3_code_valid  (code_valid[0]),
    .k3_x           (k3_x),
    .k3_y           (k3_y),
    .k3_out_valid   (out_valid[0]),
    .k3_out_bit     (out_bit[0]),
    .k3_status      (st[0]),
    .k7_in_valid    (in_valid[1]),
    .k7_in_ready    (in_ready[1]),
    .k7_in_bit      (in_bit[1]),
    .k7_window      (k7_window),
    .k7_code_valid  (code_valid[1]),
    .k7_x           (k7_x),
    .k7_y           (k7_y),
    .k7_out_valid   (out_valid[1]),
    .k7_out_bit     (out_bit[1]),
    .k7_status      (st[1]),
    .ex2_in_valid   (in_valid[2]),
    .ex2_in_ready   (in_ready[2]),
    .ex2_in_bit     (in_bit[2]),
    .ex2_window     (ex2_window),
    .ex2_code_valid (code_valid[2]),
    .ex2_pa         (ex2_pa),
    .ex2_out_valid  (out_valid[2]),
    .ex2_out_bit    (out_bit[2]),
    .ex2_status     (st[2]),
    .ex3_in_valid   (in_valid[3]),
    .ex3_in_ready   (in_ready[3]),
    .ex3_in_bit     (in_bit[3]),
    .ex3_window     (ex3_window),
    .ex3_code_valid (code_valid[3]),
    .ex3_pa         (ex3_pa),
    .ex3_out_valid  (out_valid[3]),
    .ex3_out_bit    (out_bit[3]),
    .ex3_status     (st[3])
  );

  int c_checks [4];
  int c_fail [4];
  int c_stall [4];
  int c_b2b [4];
  int c_pend [4];
  int c_acc [4];
  int c_emit [4];

  tb_fec_chan_model #(.K(3), .N(2), .CODE(0)) m_k3 (
    .clk (clk), .reset (reset), .in_valid (in_valid[0]), .in_ready (in_ready[0]),
    .in_bit (in_bit[0]), .window (k3_window), .out_valid (out_valid[0]),
    .out_bit (out_bit[0]), .status (st[0]),
    .checks (c_checks[0]), .failures (c_fail[0]), .stalls (c_stall[0]),
    .back_to_back (c_b2b[0]), .pending (c_pend[0]), .accepted (c_acc[0]),
    .emitted (c_emit[0]));
  tb_fec_chan_model #(.K(7), .N(2), .CODE(1)) m_k7 (
    .clk (clk), .reset (reset), .in_valid (in_valid[1]), .in_ready (in_ready[1]),
    .in_bit (in_bit[1]), .window (k7_window), .out_valid (out_valid[1]),
    .out_bit (out_bit[1]), .status (st[1]),
    .checks (c_checks[1]), .failures (c_fail[1]), .stalls (c_stall[1]),
    .back_to_back (c_b2b[1]), .pending (c_pend[1]), .accepted (c_acc[1]),
    .emitted (c_emit[1]));
  tb_fec_chan_model #(.K(3), .N(2), .CODE(2)) m_ex2 (
    .clk (clk), .reset (reset), .in_valid (in_valid[2]), .in_ready (in_ready[2]),
    .in_bit (in_bit[2]), .window (ex2_window), .out_valid (out_valid[2]),
    .out_bit (out_bit[2]), .status (st[2]),
    .checks (c_checks[2]), .failures (c_fail[2]), .stalls (c_stall[2]),
    .back_to_back (c_b2b[2]), .pending (c_pend[2]), .accepted (c_acc[2]),
    .emitted (c_emit[2]));
  tb_fec_chan_model #(.K(3), .N(3), .CODE(3)) m_ex3 (
    .clk (clk), .reset (reset), .in_valid (in_valid[3]), .in_ready (in_ready[3]),
    .in_bit (in_bit[3]), .window (ex3_window), .out_valid (out_valid[3]),
    .out_bit (out_bit[3]), .status (st[3]),
    .checks (c_checks[3]), .failures (c_fail[3]), .stalls (c_stall[3]),
    .back_to_back (c_b2b[3]), .pending (c_pend[3]), .accepted (c_acc[3]),
    .emitted (c_emit[3]));

  int checks = 0;
  int failures = 0;
  int resets_mid_stream = 0;
  int flag_orders_ok = 0;
  int cycle = 0;
  bit k3_log[$];
  int acc_cyc [4][$];

  localparam int NN [4] = '{2, 2, 2, 3};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // took[c]: channel c accepted its offered bit at the last rising edge.
  logic [3:0] took = '0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    took <= reset ? '0 : (in_valid & in_ready);
    if (!reset && out_valid[0]) k3_log.push_back(out_bit[0]);
    for (int c = 0; c < 4; c++)
      if (!reset && in_valid[c] && in_ready[c]) acc_cyc[c].push_back(cycle);
  end

  // Per-channel sender, working at falling edges: offers each channel's bits
  // in turn, waiting gap clocks after each accepted bit (gap < 0: random
  // gaps of 0 to 3). Returns when all bits are taken or after max_cycles.
  task automatic send_all(bit msg [4][$], int gap, int max_cycles = 1000000);
    int idx [4] = '{0, 0, 0, 0};
    int wait_c [4] = '{0, 0, 0, 0};
    bit busy;
    do begin
      busy = 1'b0;
      for (int c = 0; c < 4; c++) begin
        if (took[c]) begin
          idx[c]++;
          in_valid[c] = 1'b0;
          wait_c[c] = (gap < 0) ? int'($urandom % 4) : gap;
        end
        if (!in_valid[c] && idx[c] < msg[c].size()) begin
          if (wait_c[c] > 0) wait_c[c]--;
          else begin
            in_valid[c] = 1'b1;
            in_bit[c] = msg[c][idx[c]];
          end
        end
        if (idx[c] < msg[c].size()) busy = 1'b1;
      end
      if (busy) @(negedge clk);
      max_cycles--;
    end while (busy && max_cycles > 0);
  endtask

  task automatic drain();
    in_valid = '0;
    for (int i = 0; i < 60; i++) @(negedge clk);
    for (int c = 0; c < 4; c++)
      check(c_pend[c] == 0 && !out_valid[c], $sformatf("channel %0d did not finish", c));
  endtask

  initial begin : main
    bit msg [4][$];
    bit prev_flag [4];
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);

    // 1. the 8-bit message of the worked vector, slow
    // 01111011, first character first
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < 8; i++) msg[c].push_back(i == 0 || i == 5 ? 1'b0 : 1'b1);
    fork
      send_all(msg, 6);
      begin : flag_watch
        bit seen_f [4], seen_f1 [4], seen_op [4];
        bit ok [4];
        for (int c = 0; c < 4; c++) ok[c] = 1'b1;
        repeat (20) begin
          @(negedge clk);
          for (int c = 0; c < 4; c++) begin
            if (st[c].flag1 && !seen_f[c]) ok[c] = 1'b0;
            if (st[c].op_ready && !seen_f1[c]) ok[c] = 1'b0;
            seen_f[c] |= st[c].flag;
            seen_f1[c] |= st[c].flag1;
            seen_op[c] |= st[c].op_ready;
          end
        end
        for (int c = 0; c < 4; c++) if (ok[c] && seen_op[c]) flag_orders_ok++;
      end
    join
    drain();
    check(k3_log.size() == 16, "K=3 channel: 16 code bits for 8 message bits");
    begin
      string want;
      want = "0011011010010001";
      for (int i = 0; i < 16 && i < k3_log.size(); i++)
        check(k3_log[i] == (want[i] == "1"), $sformatf("K=3 code word bit %0d", i));
    end

    // 2. a bit offered every clock
    for (int c = 0; c < 4; c++) begin
      msg[c].delete();
      acc_cyc[c].delete();
      for (int i = 0; i < 300; i++) msg[c].push_back(1'($urandom));
    end
    send_all(msg, 0);
    drain();
    for (int c = 0; c < 4; c++) begin
      int span;
      span = (acc_cyc[c].size() == 300) ? acc_cyc[c][299] - acc_cyc[c][10] : -1;
      check(acc_cyc[c].size() == 300, $sformatf("channel %0d: %0d bits taken", c, acc_cyc[c].size()));
      check(span == 289 * NN[c],
            $sformatf("channel %0d: %0d clocks for 289 message bits, want %0d",
                      c, span, 289 * NN[c]));
    end

    // 3. random traffic cut by a reset in mid-stream
    for (int c = 0; c < 4; c++) begin
      msg[c].delete();
      for (int i = 0; i < 2000; i++) msg[c].push_back(1'($urandom));
    end
    send_all(msg, -1, 1500);
    check(out_valid != '0 || c_pend[0] + c_pend[1] + c_pend[2] + c_pend[3] > 0,
          "reset should hit a stream in flight");
    reset = 1'b1;
    in_valid = '0;
    resets_mid_stream++;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    check(k3_window == '0 && k7_window == '0 && ex2_window == '0 && ex3_window == '0,
          "registers cleared by reset");
    for (int c = 0; c < 4; c++) check(st[c] == '0, "flags cleared by reset");
    check(out_valid == '0, "outputs idle after reset");

    // 4. random traffic to the end
    for (int c = 0; c < 4; c++) begin
      msg[c].delete();
      for (int i = 0; i < 1000; i++) msg[c].push_back(1'($urandom));
    end
    send_all(msg, -1);
    drain();

    for (int c = 0; c < 4; c++) begin
      checks += c_checks[c];
      failures += c_fail[c];
      check(c_stall[c] > 0, $sformatf("channel %0d: input stall never happened", c));
      check(c_b2b[c] > 0, $sformatf("channel %0d: back-to-back output never happened", c));
      $display("channel %0d: %0d bits in, %0d bits out, %0d stalls, %0d back-to-back",
               c, c_acc[c], c_emit[c], c_stall[c], c_b2b[c]);
    end
    check(flag_orders_ok == 4, $sformatf("flag order seen on %0d of 4 channels", flag_orders_ok));
    check(resets_mid_stream > 0, "mid-stream reset never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
