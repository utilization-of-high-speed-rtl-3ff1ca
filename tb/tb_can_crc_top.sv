// tb_can_crc_top: end-to-end test of can_crc_top at its default parameters.
//
// CAN CRC-15 path: random frames (SOF through data field, 19..108 bits) go
// into the transmit encoder in 3-bit beats with random idle cycles; each
// transmit CRC is compared with long division and then, together with its
// frame, sent over the receive side (running at the same time as the next
// transmit frame). One frame in three has bits flipped on the way. The
// receive checker must give a dominant ACK slot (0) for intact frames and a
// recessive one (1) for corrupted ones, with the long-division syndrome.
//
// Serial link: random 12-bit words are encoded and decoded through the
// channel mask; clean words must come back with error = 0, corrupted ones
// with the syndrome of the received word.
//
// Every mechanism is counted: idle beats between beats, back-to-back
// frames, transmit/receive overlap, dominant and recessive ACK, clean and
// corrupted serial transfers. One that never happened counts as a failure.
module tb_can_crc_top;
  import crc_ref_pkg::*;

  localparam int U      = 3;
  localparam int NFRAME = 200;
  localparam int NWORD  = 150;

  logic         clk = 1'b0;
  logic         rst;
  logic         tx_valid, tx_sof, tx_last;
  logic [U-1:0] tx_bits;
  logic         tx_crc_valid;
  logic [14:0]  tx_crc;
  logic         rx_valid, rx_sof, rx_last;
  logic [U-1:0] rx_bits;
  logic         rx_result_valid, rx_crc_ok, rx_ack_slot;
  logic [14:0]  rx_syndrome;
  logic         crc_en;
  logic [11:0]  data_in, data_decod;
  logic [16:0]  chan_err, data_trans;
  logic [4:0]   crc_out, dec_error;
  logic         enc_done, dec_done, link_busy;

  int checks = 0, failures = 0, cyc = 0;
  int n_idle = 0, n_b2b = 0, n_overlap = 0, n_ack_dom = 0, n_ack_rec = 0;
  int n_link_clean = 0, n_link_err = 0, n_rx_done = 0, n_tx_done = 0;

  // transmit frames awaiting their CRC, then frames awaiting reception
  bitvec_t     txm_q[$];
  int          txl_q[$];
  bitvec_t     rxm_q[$];
  int          rxl_q[$];
  logic [14:0] rxc_q[$];
  logic [14:0] rxe_q[$];   // expected syndromes

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  can_crc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- transmit-side results ----
  always @(negedge clk) if (!rst && tx_crc_valid) begin
    bitvec_t     m;
    int          l;
    logic [14:0] e;
    n_tx_done++;
    if (txm_q.size() == 0) check(1'b0, "tx CRC with no frame outstanding");
    else begin
      m = txm_q.pop_front();
      l = txl_q.pop_front();
      e = 15'(crc_of(m, l, 15, CAN_P));
      check(tx_crc == e, $sformatf("tx crc got %h exp %h", tx_crc, e));
      rxm_q.push_back(m);
      rxl_q.push_back(l);
      rxc_q.push_back(tx_crc);       // use what the encoder produced
    end
  end

  // ---- receive-side results ----
  always @(negedge clk) if (!rst && rx_result_valid) begin
    logic [14:0] e;
    n_rx_done++;
    if (rxe_q.size() == 0) check(1'b0, "rx result with no frame outstanding");
    else begin
      e = rxe_q.pop_front();
      check(rx_syndrome == e, $sformatf("rx syndrome got %h exp %h", rx_syndrome, e));
      check(rx_ack_slot == (e != 0), "ACK slot level");
      check(rx_crc_ok == (e == 0), "crc_ok");
      if (rx_ack_slot) n_ack_rec++; else n_ack_dom++;
    end
  end

  always @(negedge clk) if (tx_valid && rx_valid) n_overlap++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tx_thread();
    bitvec_t m;
    int      len, nb;
    for (int f = 0; f < NFRAME; f++) begin
      len = 19 + ($urandom % 90);
      m   = rand_msg(len);
      nb  = (len + U - 1) / U;
      for (int b = nb - 1; b >= 0; b--) begin
        if ($urandom % 5 == 0) begin
          @(negedge clk) tx_valid = 1'b0;
          n_idle++;
        end
        @(negedge clk) begin
          tx_valid = 1'b1; tx_sof = (b == nb - 1); tx_last = (b == 0);
          tx_bits  = U'(m >> (b * U));
        end
      end
      txm_q.push_back(m);
      txl_q.push_back(len);
      if (($urandom % 2) != 0) @(negedge clk) tx_valid = 1'b0; else n_b2b++;
    end
    @(negedge clk) tx_valid = 1'b0;
  endtask

  task automatic rx_thread();
    bitvec_t w;
    int      len, nb, pos;
    for (int f = 0; f < NFRAME; f++) begin
      while (rxm_q.size() == 0) @(negedge clk);
      len = rxl_q.pop_front() + 15;
      w   = (rxm_q.pop_front() << 15) | bitvec_t'(rxc_q.pop_front());
      if (f % 3 == 1) begin
        pos = $urandom % len;
        w[pos] = ~w[pos];
      end
      rxe_q.push_back(15'(crc_of(w, len, 15, CAN_P)));
      nb = (len + U - 1) / U;
      for (int b = nb - 1; b >= 0; b--) begin
        @(negedge clk) begin
          rx_valid = 1'b1; rx_sof = (b == nb - 1); rx_last = (b == 0);
          rx_bits  = U'(w >> (b * U));
        end
      end
      @(negedge clk) rx_valid = 1'b0;
    end
  endtask

  task automatic link_thread();
    logic [11:0] d;
    logic [16:0] err, word;
    for (int t = 0; t < NWORD; t++) begin
      d   = 12'($urandom);
      err = (t % 2) ? 17'(1) << ($urandom % 17) : '0;
      if (t == 0) begin d = 12'hAF5; err = '0; end
      @(negedge clk) begin crc_en = 1'b1; data_in = d; chan_err = err; end
      @(negedge clk) crc_en = 1'b0;
      while (!enc_done) @(negedge clk);
      check(data_trans == {d, 5'(crc_of(bitvec_t'(d), 12, 5, DEMO_P))}, "code word");
      check(crc_out == data_trans[4:0], "crc_out");
      word = data_trans ^ err;
      while (!dec_done) @(negedge clk);
      check(data_decod == word[16:5], "decoded data");
      check(dec_error == 5'(crc_of(bitvec_t'(word), 17, 5, DEMO_P)), "link syndrome");
      check((dec_error == 0) == (err == 0), "error flagged iff the channel corrupted the word");
      if (err == 0) n_link_clean++; else n_link_err++;
      @(negedge clk);
      check(!link_busy, "link idle after decoding");
    end
  endtask

  initial begin
    rst = 1'b1;
    tx_valid = 1'b0; tx_sof = 1'b0; tx_last = 1'b0; tx_bits = '0;
    rx_valid = 1'b0; rx_sof = 1'b0; rx_last = 1'b0; rx_bits = '0;
    crc_en = 1'b0; data_in = '0; chan_err = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    fork
      tx_thread();
      rx_thread();
      link_thread();
    join
    repeat (8) @(negedge clk);

    check(n_tx_done == NFRAME && n_rx_done == NFRAME, "every frame encoded and checked");
    check(n_idle > 0,       "idle cycles between beats happened");
    check(n_b2b > 0,        "back-to-back frames happened");
    check(n_overlap > 0,    "transmit and receive overlapped");
    check(n_ack_dom > 0,    "dominant ACK (intact frame) happened");
    check(n_ack_rec > 0,    "recessive ACK (corrupted frame) happened");
    check(n_link_clean > 0, "clean serial transfer happened");
    check(n_link_err > 0,   "corrupted serial transfer happened");
    $display("idle=%0d b2b=%0d overlap=%0d ack_dom=%0d ack_rec=%0d link_clean=%0d link_err=%0d",
             n_idle, n_b2b, n_overlap, n_ack_dom, n_ack_rec, n_link_clean, n_link_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
