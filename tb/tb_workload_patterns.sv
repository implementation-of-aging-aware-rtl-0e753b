// Workload testbench: 65,536 input patterns through each multiplier size and
// array type that was evaluated for the design (8 x 8 and 16 x 16, column
// and row bypassing).
//
// The 16 x 16 multipliers get 65,536 uniformly random patterns each; the
// 8 x 8 multipliers get all 65,536 (md, mr) pairs. The 16 x 16
// column-bypassing instance uses the default parameters. Every product and
// every operation's latency are checked by aam_stream. On top of that the
// share of one-cycle operations is compared with what the judging rule
// gives by counting: for 8-bit exhaustive input exactly 93 of the 256 judged
// operand values have more than 4 zero bits, so 93 * 256 = 23,808 one-cycle
// operations; for 16-bit random input the share must be near
// P(more than 8 zeros of 16) = 26,333 / 65,536 = 0.4018.
module tb_workload_patterns;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  localparam int NOPS = 65536;

  logic done [4];
  int   chk [4], fl [4], one [4], two [4], cyc [4];

  aam_stream #(.M(16), .BYPASS(aam_pkg::BYPASS_COLUMN), .NOPS(NOPS), .EXHAUSTIVE(1'b0)) u_c16 (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_one(one[0]), .n_two(two[0]), .cycles(cyc[0]));
  aam_stream #(.M(16), .BYPASS(aam_pkg::BYPASS_ROW), .NOPS(NOPS), .EXHAUSTIVE(1'b0)) u_r16 (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_one(one[1]), .n_two(two[1]), .cycles(cyc[1]));
  aam_stream #(.M(8), .BYPASS(aam_pkg::BYPASS_COLUMN), .NOPS(NOPS), .EXHAUSTIVE(1'b1)) u_c8 (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_one(one[2]), .n_two(two[2]), .cycles(cyc[2]));
  aam_stream #(.M(8), .BYPASS(aam_pkg::BYPASS_ROW), .NOPS(NOPS), .EXHAUSTIVE(1'b1)) u_r8 (
    .clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_one(one[3]), .n_two(two[3]), .cycles(cyc[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real share;
    string name [4] = '{"16x16 column", "16x16 row", "8x8 column", "8x8 row"};
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      checks   += chk[k] + 2;
      failures += fl[k];
      if (one[k] + two[k] != NOPS) failures++;
      share = real'(one[k]) / NOPS;
      if (k >= 2) begin
        if (one[k] != 93 * 256) failures++;
      end else if (share < 0.39 || share > 0.414) failures++;
      $display("%s: %0d patterns, one-cycle %0d (%0.4f), two-cycle %0d, %0d cycles, %0.3f cycles per operation",
               name[k], NOPS, one[k], share, two[k], cyc[k], real'(cyc[k]) / NOPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
