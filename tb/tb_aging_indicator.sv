// Self-checking testbench for aging_indicator (window 32 operations,
// threshold 4 errors). Many episodes, each starting from reset, drive random
// operation-done and error pulses at a per-episode error rate. A reference
// model of the window and error counters predicts aged every cycle. The test
// counts episodes that aged and episodes whose errors were spread over
// several windows without ever reaching the threshold in one of them.
module tb_aging_indicator;

  localparam int WINDOW = 32;
  localparam int THR    = 4;

  logic clk = 1'b0, rst_n = 1'b0, op_done = 1'b0, error = 1'b0, aged;

  int checks = 0, failures = 0;
  int n_aged_eps = 0, n_spread_eps = 0, cycles = 0;

  aging_indicator u_dut (.clk, .rst_n, .op_done, .error, .aged);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    int  op_m, err_m, total_err, rate;
    logic aged_m;
    for (int ep = 0; ep < 120; ep++) begin
      rst_n = 1'b0;
      op_done = 1'b0; error = 1'b0;
      @(posedge clk);
      #1;
      check(aged, 1'b0, "aged after reset");
      rst_n = 1'b1;
      op_m = 0; err_m = 0; aged_m = 1'b0; total_err = 0;
      rate = (ep % 3 == 0) ? 20 : ((ep % 3 == 1) ? 60 : 160);   // errors per 1000 cycles
      for (int c = 0; c < 400; c++) begin
        op_done <= ($urandom_range(1, 0) == 1);
        error   <= ($urandom_range(999, 0) < rate);
        @(posedge clk);
        // Reference model, applied to what the edge sampled.
        if (error && err_m == THR - 1) aged_m = 1'b1;
        if (op_done && op_m == WINDOW - 1) begin
          op_m = 0; err_m = 0;
        end else begin
          if (op_done) op_m++;
          if (error && err_m != THR) err_m++;
        end
        if (error) total_err++;
        #1;
        check(aged, aged_m, "aged");
      end
      if (aged_m) n_aged_eps++;
      else if (total_err >= THR) n_spread_eps++;
    end
    check(n_aged_eps > 10 && n_spread_eps > 5, 1'b1, "coverage");
    $display("episodes aged=%0d spread-without-aging=%0d", n_aged_eps, n_spread_eps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
