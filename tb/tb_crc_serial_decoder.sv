// tb_crc_serial_decoder: self-checking test of the serial 12-bit / 5-bit
// CRC decoder (P(x) = x^5 + x^4 + x^2 + 1).
//
// Code words are built in the testbench by long division. Intact words must
// give error = 0 and the original data; words with random bit errors must
// give as syndrome the long-division remainder of the received word times
// x^5, which is what the direct-form LFSR leaves (every single-bit error
// gives a non-zero one). done must be high exactly
// DATA_W+CRC_W+2 = 19 cycles after the cycle presenting dec_en.
module tb_crc_serial_decoder;
  import crc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        dec_en;
  logic [16:0] data_trans;
  logic [11:0] data_decod;
  logic [4:0]  error;
  logic        busy, done;
  int          checks = 0, failures = 0;
  int          cyc = 0;
  int          n_single = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  crc_serial_decoder dut (
    .clk(clk), .rst(rst), .dec_en(dec_en), .data_trans(data_trans),
    .data_decod(data_decod), .error(error), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic decode(input logic [16:0] word);
    int         start;
    logic [4:0] s;
    @(negedge clk) begin dec_en = 1'b1; data_trans = word; start = cyc; end
    @(negedge clk) begin dec_en = 1'b0; data_trans = ~word; end
    while (!done) @(negedge clk);
    s = 5'(crc_of(bitvec_t'(word), 17, 5, DEMO_P));
    check(cyc - start == 19, $sformatf("latency %0d", cyc - start));
    check(error == s, $sformatf("word %h syndrome got %h exp %h", word, error, s));
    check(data_decod == word[16:5], "data part");
    @(negedge clk);
    check(!done && !busy, "single done pulse, back to idle");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] d;
    logic [16:0] w;
    int          pos;
    rst = 1'b1; dec_en = 1'b0; data_trans = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    decode(17'h15EAA);                       // 12'hAF5 with its CRC
    check(error == 5'h00 && data_decod == 12'hAF5, "worked example decodes clean");
    decode(17'h15EAE);                       // one bit flipped in the CRC
    check(error == 5'h0B, "worked example with bit 2 flipped");

    for (int t = 0; t < 300; t++) begin
      d = 12'($urandom);
      w = {d, 5'(crc_of(bitvec_t'(d), 12, 5, DEMO_P))};
      case (t % 3)
        0: ;                                             // intact
        1: begin pos = $urandom % 17; w[pos] = ~w[pos]; n_single++; end
        default: w ^= 17'($urandom);
      endcase
      decode(w);
      if (t % 3 == 0) check(error == 0, "intact word gives zero syndrome");
      if (t % 3 == 1) check(error != 0, "single-bit error detected");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
