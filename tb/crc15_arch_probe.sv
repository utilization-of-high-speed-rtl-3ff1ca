// crc15_arch_probe: drives one crc15_unfolded configuration (UNFOLD bits per
// clock, LOOKAHEAD-level look-ahead loop) with NFRAME random CAN-length
// frames, checks every CRC against polynomial long division and the result
// timing (result in the 2nd cycle after the last beat), and measures the
// cycles a 15-bit message takes from its first beat to its result.
// Used by tb_crc15_architectures.
module crc15_arch_probe
  import crc_ref_pkg::*;
#(
  parameter int unsigned UNFOLD    = 3,
  parameter int unsigned LOOKAHEAD = 4,
  parameter int          NFRAME    = 100
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   cycles15,
  output logic finished
);

  logic              in_valid, in_sof, in_last;
  logic [UNFOLD-1:0] in_bits;
  logic              out_valid;
  logic [14:0]       out_crc;
  int                cyc = 0;
  logic [14:0]       exp_q[$];
  int                due_q[$];
  int                first_cyc;

  always @(posedge clk) cyc <= cyc + 1;

  crc15_unfolded #(.UNFOLD(UNFOLD), .LOOKAHEAD(LOOKAHEAD)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_sof(in_sof),
    .in_last(in_last), .in_bits(in_bits), .out_valid(out_valid),
    .out_crc(out_crc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (UNFOLD=%0d LOOKAHEAD=%0d): %s", UNFOLD, LOOKAHEAD, what);
    end
  endtask

  always @(negedge clk) if (!rst && out_valid) begin
    if (exp_q.size() == 0) check(1'b0, "result with no frame outstanding");
    else begin
      logic [14:0] e;
      int          d;
      e = exp_q.pop_front();
      d = due_q.pop_front();
      check(out_crc == e, $sformatf("crc got %h exp %h", out_crc, e));
      check(cyc == d, $sformatf("result at %0d expected %0d", cyc, d));
      if (cycles15 < 0) cycles15 = cyc - first_cyc + 1;
    end
  end

  task automatic send(input bitvec_t m, input int len, input bit gaps);
    int nb;
    nb = (len + UNFOLD - 1) / UNFOLD;
    for (int b = nb - 1; b >= 0; b--) begin
      if (gaps && ($urandom % 4 == 0)) @(negedge clk) in_valid = 1'b0;
      @(negedge clk) begin
        in_valid = 1'b1; in_sof = (b == nb - 1); in_last = (b == 0);
        in_bits  = UNFOLD'(m >> (b * UNFOLD));
        if (b == nb - 1 && first_cyc < 0) first_cyc = cyc;
      end
    end
    exp_q.push_back(15'(crc_of(m, len, 15, CAN_P)));
    due_q.push_back(cyc + 2);
  endtask

  initial begin
    int len;
    checks = 0; failures = 0; cycles15 = -1; finished = 1'b0; first_cyc = -1;
    in_valid = 1'b0; in_sof = 1'b0; in_last = 1'b0; in_bits = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    send(rand_msg(15), 15, 1'b0);          // timed 15-bit message
    @(negedge clk) in_valid = 1'b0;
    for (int f = 0; f < NFRAME; f++) begin
      len = 19 + ($urandom % 90);
      send(rand_msg(len), len, 1'b1);
      if (($urandom % 2) != 0) @(negedge clk) in_valid = 1'b0;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(exp_q.size() == 0, "all results seen");
    check(cycles15 == (15 + UNFOLD - 1) / UNFOLD + 2, "15-bit message cycle count");
    finished = 1'b1;
  end

endmodule
