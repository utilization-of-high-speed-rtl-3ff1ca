// tb_crc15_unfolded: self-checking test of the parallel CRC-15 engine at its
// default configuration (3 bits per clock, 4-level look-ahead loop).
//
// Frames of random length (1..130 bits, padded with leading zeros to whole
// beats) are streamed with random idle cycles between beats and, at times,
// back to back. Each result is compared with polynomial long division and
// its latency is checked: out_valid must be high exactly two cycles after the
// cycle that presents the in_last beat. Also checks the CRC-15/CAN check
// value of "123456789" (0x059E) and single-beat frames.
module tb_crc15_unfolded;
  import crc_ref_pkg::*;

  localparam int U = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic         in_valid, in_sof, in_last;
  logic [U-1:0] in_bits;
  logic         out_valid;
  logic [14:0]  out_crc;
  int           checks = 0, failures = 0;
  int           cyc = 0;
  int           frames_sent = 0, results_seen = 0, bubbles = 0, b2b = 0;

  logic [14:0]  exp_q[$];
  int           due_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  crc15_unfolded dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_sof(in_sof),
    .in_last(in_last), .in_bits(in_bits), .out_valid(out_valid),
    .out_crc(out_crc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Results are sampled at the falling edge.
  always @(negedge clk) if (!rst && out_valid) begin
    results_seen++;
    if (exp_q.size() == 0) check(1'b0, "out_valid with no frame outstanding");
    else begin
      logic [14:0] e;
      int          d;
      e = exp_q.pop_front();
      d = due_q.pop_front();
      check(out_crc == e, $sformatf("crc got %h exp %h", out_crc, e));
      check(cyc == d, $sformatf("latency: result at cycle %0d, expected %0d", cyc, d));
    end
  end

  // Send one frame; gap_pct is the chance of an idle cycle before a beat.
  task automatic send(input bitvec_t m, input int len, input int gap_pct);
    int nb;
    bitvec_t p;
    nb = (len + U - 1) / U;
    p  = m;                          // leading zeros pad the first beat
    for (int b = nb - 1; b >= 0; b--) begin
      while ($urandom % 100 < gap_pct) begin
        @(negedge clk) in_valid = 1'b0;
        bubbles++;
      end
      @(negedge clk) begin
        in_valid = 1'b1;
        in_sof   = (b == nb - 1);
        in_last  = (b == 0);
        in_bits  = U'(p >> (b * U));
      end
      if (b == 0) begin
        exp_q.push_back(15'(crc_of(m, len, 15, CAN_P)));
        due_q.push_back(cyc + 2);
      end
    end
    frames_sent++;
  endtask

  task automatic idle();
    @(negedge clk) begin in_valid = 1'b0; in_sof = 1'b0; in_last = 1'b0; in_bits = '0; end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitvec_t m;
    int      len;
    rst = 1'b1; in_valid = 1'b0; in_sof = 1'b0; in_last = 1'b0; in_bits = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    m = '0;
    for (int c = 0; c < 9; c++) m = (m << 8) | bitvec_t'(8'h31 + c);
    send(m, 72, 0);
    idle();
    repeat (3) idle();
    check(out_crc == 15'h059E, $sformatf("check value got %h", out_crc));

    for (int i = 0; i < 8; i++) begin     // single-beat frames, back to back
      send(bitvec_t'(i), 3, 0);
      b2b++;
    end
    idle();

    for (int t = 0; t < 400; t++) begin
      len = 1 + ($urandom % 130);
      m   = rand_msg(len);
      send(m, len, (t % 3 == 0) ? 0 : 25);
      if (($urandom % 2) != 0) idle(); else b2b++;
    end
    repeat (6) idle();

    check(exp_q.size() == 0, "every frame produced a result");
    check(results_seen == frames_sent, "one result per frame");
    check(bubbles > 0 && b2b > 0, "idle beats and back-to-back frames both exercised");
    $display("frames=%0d idle_beats=%0d back_to_back=%0d", frames_sent, bubbles, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
