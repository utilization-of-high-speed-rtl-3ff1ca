// tb_crc15_architectures: runs the CRC-15 engine in the architecture steps
// of the derivation and checks each on random CAN-length frames:
//   UNFOLD=1 LOOKAHEAD=1  original bit-serial loop
//   UNFOLD=1 LOOKAHEAD=2  2-level look-ahead pipelined
//   UNFOLD=1 LOOKAHEAD=4  4-level look-ahead pipelined and retimed
//   UNFOLD=3 LOOKAHEAD=1  3-point unfolded only
//   UNFOLD=3 LOOKAHEAD=4  3-point unfolded, 4-level pipelined, retimed
// Prints, per configuration, the cycles from the first beat of a 15-bit
// message to the cycle its CRC is valid (ceil(15/UNFOLD) beats + 2).
module tb_crc15_architectures;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;

  int   c[5], f[5], cy[5];
  logic fin[5];

  always #5 clk = ~clk;

  crc15_arch_probe #(.UNFOLD(1), .LOOKAHEAD(1)) p0 (.clk, .rst, .checks(c[0]), .failures(f[0]), .cycles15(cy[0]), .finished(fin[0]));
  crc15_arch_probe #(.UNFOLD(1), .LOOKAHEAD(2)) p1 (.clk, .rst, .checks(c[1]), .failures(f[1]), .cycles15(cy[1]), .finished(fin[1]));
  crc15_arch_probe #(.UNFOLD(1), .LOOKAHEAD(4)) p2 (.clk, .rst, .checks(c[2]), .failures(f[2]), .cycles15(cy[2]), .finished(fin[2]));
  crc15_arch_probe #(.UNFOLD(3), .LOOKAHEAD(1)) p3 (.clk, .rst, .checks(c[3]), .failures(f[3]), .cycles15(cy[3]), .finished(fin[3]));
  crc15_arch_probe #(.UNFOLD(3), .LOOKAHEAD(4)) p4 (.clk, .rst, .checks(c[4]), .failures(f[4]), .cycles15(cy[4]), .finished(fin[4]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("cycles for a 15-bit message: original=%0d 2-level=%0d 4-level=%0d unfolded=%0d unfolded+4-level=%0d",
             cy[0], cy[1], cy[2], cy[3], cy[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
