// tb_crc_serial_encoder: self-checking test of the serial 12-bit / 5-bit
// CRC encoder (P(x) = x^5 + x^4 + x^2 + 1).
//
// Checks the word 12'hAF5 (remainder 5'h0A, code word 17'h15EAA by long
// division), all-zero and all-one words and 300 random words against
// polynomial long division; that data_trans = {data_in, crc_out}; that done
// is high exactly DATA_W+2 = 14 cycles after the cycle presenting crc_en;
// and that a crc_en while busy is ignored.
module tb_crc_serial_encoder;
  import crc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        crc_en;
  logic [11:0] data_in;
  logic [16:0] data_trans;
  logic [4:0]  crc_out;
  logic        busy, done;
  int          checks = 0, failures = 0;
  int          cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  crc_serial_encoder dut (
    .clk(clk), .rst(rst), .crc_en(crc_en), .data_in(data_in),
    .data_trans(data_trans), .crc_out(crc_out), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic encode(input logic [11:0] d, input bit poke_busy);
    int          start;
    logic [4:0]  e;
    @(negedge clk) begin crc_en = 1'b1; data_in = d; start = cyc; end
    @(negedge clk) begin crc_en = 1'b0; data_in = ~d; end
    if (poke_busy) begin
      @(negedge clk) crc_en = 1'b1;       // must be ignored
      @(negedge clk) crc_en = 1'b0;
    end
    while (!done) @(negedge clk);
    e = 5'(crc_of(bitvec_t'(d), 12, 5, DEMO_P));
    check(cyc - start == 14, $sformatf("latency %0d", cyc - start));
    check(crc_out == e, $sformatf("data %h crc got %h exp %h", d, crc_out, e));
    check(data_trans == {d, e}, $sformatf("data %h data_trans %h", d, data_trans));
    @(negedge clk);
    check(!done && !busy, "done is a single pulse and encoder returns idle");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; crc_en = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    encode(12'hAF5, 1'b0);
    check(crc_out == 5'h0A && data_trans == 17'h15EAA, "worked example 12'hAF5");
    encode(12'h000, 1'b0);
    check(crc_out == 5'h00, "zero word has zero CRC");
    encode(12'hFFF, 1'b1);
    for (int t = 0; t < 300; t++) encode(12'($urandom), t % 5 == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
