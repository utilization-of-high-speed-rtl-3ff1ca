// tb_crc15_can_checker: self-checking test of the CAN CRC-15 receive
// checker.
//
// Builds random frames (SOF through data field, 19..108 bits), appends the
// CRC worked out by polynomial long division and streams the code word in
// 3-bit beats. Half of the frames have one to three bits flipped. Expected:
// syndrome = long-division remainder of the received word times x^15, crc_ok when it is
// zero, ACK slot dominant (0) for intact frames and recessive (1) for
// corrupted ones, result_valid three cycles after the in_last beat's cycle.
module tb_crc15_can_checker;
  import crc_ref_pkg::*;

  localparam int U = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic         in_valid, in_sof, in_last;
  logic [U-1:0] in_bits;
  logic         result_valid, crc_ok, ack_slot;
  logic [14:0]  syndrome;
  int           checks = 0, failures = 0;
  int           cyc = 0;
  int           n_good = 0, n_bad = 0, n_results = 0;

  logic [14:0]  exp_q[$];
  int           due_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  crc15_can_checker dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_sof(in_sof),
    .in_last(in_last), .in_bits(in_bits), .result_valid(result_valid),
    .syndrome(syndrome), .crc_ok(crc_ok), .ack_slot(ack_slot));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) if (!rst && result_valid) begin
    n_results++;
    if (exp_q.size() == 0) check(1'b0, "result with no frame outstanding");
    else begin
      logic [14:0] e;
      int          d;
      e = exp_q.pop_front();
      d = due_q.pop_front();
      check(syndrome == e, $sformatf("syndrome got %h exp %h", syndrome, e));
      check(crc_ok == (e == 0), "crc_ok");
      check(ack_slot == (e != 0), "ack_slot level");
      check(cyc == d, $sformatf("latency: at %0d expected %0d", cyc, d));
    end
  end

  task automatic send(input bitvec_t w, input int len);
    int nb;
    nb = (len + U - 1) / U;
    for (int b = nb - 1; b >= 0; b--) begin
      if ($urandom % 4 == 0) @(negedge clk) in_valid = 1'b0;
      @(negedge clk) begin
        in_valid = 1'b1;
        in_sof   = (b == nb - 1);
        in_last  = (b == 0);
        in_bits  = U'(w >> (b * U));
      end
      if (b == 0) begin
        exp_q.push_back(15'(crc_of(w, len, 15, CAN_P)));
        due_q.push_back(cyc + 3);
      end
    end
    @(negedge clk) begin in_valid = 1'b0; in_sof = 1'b0; in_last = 1'b0; end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitvec_t     m, w;
    int          len, nflip, pos;
    logic [14:0] c;
    rst = 1'b1; in_valid = 1'b0; in_sof = 1'b0; in_last = 1'b0; in_bits = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(ack_slot == 1'b1, "ACK slot recessive after reset");

    for (int t = 0; t < 300; t++) begin
      len = 19 + ($urandom % 90);
      m   = rand_msg(len);
      c   = 15'(crc_of(m, len, 15, CAN_P));
      w   = (m << 15) | bitvec_t'(c);
      if (t % 2) begin
        nflip = 1 + ($urandom % 3);
        for (int k = 0; k < nflip; k++) begin
          pos = $urandom % (len + 15);
          w[pos] = ~w[pos];
        end
      end
      if (poly_mod(w, len + 15, 15, CAN_P) == 0) n_good++; else n_bad++;
      send(w, len + 15);
    end
    repeat (6) @(negedge clk);

    check(exp_q.size() == 0 && n_results == 300, "one result per frame");
    check(n_good > 0 && n_bad > 0, "both intact and corrupted frames seen");
    $display("intact=%0d corrupted=%0d", n_good, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
