// tb_crc_lfsr_serial: self-checking test of the bit-serial CRC LFSR.
//
// Instance u_can uses the CAN CRC-15 defaults; instance u_tut is set to the
// 4-bit generator x^4 + x^2 + 1 of the long-division example. Checks:
//  - the standard CRC-15/CAN check value 0x059E for the ASCII string
//    "123456789" (init 0, MSB first);
//  - data 1010111 with x^4 + x^2 + 1 leaves remainder 1111;
//  - random messages of 1..200 bits against polynomial long division;
//  - a code word {message, CRC} shifts back to a zero register;
//  - clear restarts from zero and en low holds the register;
//  - the register shows a bit one clock after it is shifted in.
module tb_crc_lfsr_serial;
  import crc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        clear, en, din;
  logic [14:0] crc15;
  logic        t_clear, t_en, t_din;
  logic [3:0]  crc4;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_lfsr_serial u_can (
    .clk(clk), .rst(rst), .clear(clear), .en(en), .din(din), .crc(crc15));

  crc_lfsr_serial #(.WIDTH(4), .POLY(4'h5)) u_tut (
    .clk(clk), .rst(rst), .clear(t_clear), .en(t_en), .din(t_din), .crc(crc4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Shift len bits of v (MSB first) into u_can.
  task automatic shift15(input bitvec_t v, input int len);
    @(negedge clk) begin clear = 1'b1; en = 1'b0; end
    for (int i = len - 1; i >= 0; i--) begin
      @(negedge clk) begin clear = 1'b0; en = 1'b1; din = v[i]; end
    end
    @(negedge clk) begin en = 1'b0; din = 1'b0; end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitvec_t     m;
    int          len;
    logic [14:0] exp;
    rst = 1'b1; clear = 1'b0; en = 1'b0; din = 1'b0;
    t_clear = 1'b0; t_en = 1'b0; t_din = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(crc15 == 15'h0 && crc4 == 4'h0, "reset clears the register");

    // "123456789"
    m = '0;
    for (int c = 0; c < 9; c++) m = (m << 8) | bitvec_t'(8'h31 + c);
    shift15(m, 72);
    check(crc15 == 15'h059E, $sformatf("CRC-15/CAN check value: got %h", crc15));

    // Long-division example: 1010111 / x^4+x^2+1
    @(negedge clk) t_clear = 1'b1;
    for (int i = 6; i >= 0; i--) begin
      @(negedge clk) begin t_clear = 1'b0; t_en = 1'b1; t_din = 1'((7'b1010111 >> i) & 1); end
    end
    @(negedge clk) t_en = 1'b0;
    check(crc4 == 4'b1111, $sformatf("example remainder: got %b", crc4));
    check(crc4 == 4'(crc_of(bitvec_t'(7'b1010111), 7, 4, TUTOR_P)), "example vs long division");

    // Random messages, then the code word residue
    for (int t = 0; t < 300; t++) begin
      len = 1 + ($urandom % 200);
      m   = rand_msg(len);
      exp = 15'(crc_of(m, len, 15, CAN_P));
      shift15(m, len);
      check(crc15 == exp, $sformatf("random len %0d: got %h exp %h", len, crc15, exp));
      shift15((m << 15) | bitvec_t'(exp), len + 15);
      check(crc15 == 15'h0, $sformatf("code word residue len %0d: %h", len, crc15));
    end

    // en low holds; one-cycle visibility
    shift15(bitvec_t'(9'h1A5), 9);
    exp = crc15;
    repeat (5) @(negedge clk);
    check(crc15 == exp, "register holds while en is low");
    @(negedge clk) begin en = 1'b1; din = 1'b1; end
    check(crc15 == exp, "no change before the clock edge");
    @(negedge clk) en = 1'b0;
    check(crc15 == 15'(crc_of((bitvec_t'(9'h1A5) << 1) | 1, 10, 15, CAN_P)),
          "bit appears one clock after it is shifted in");
    // clear wins over en
    @(negedge clk) begin clear = 1'b1; en = 1'b1; din = 1'b1; end
    @(negedge clk) begin clear = 1'b0; en = 1'b0; end
    check(crc15 == 15'h0, "clear has priority over en");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
