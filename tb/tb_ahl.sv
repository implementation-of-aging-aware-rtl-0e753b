// Self-checking testbench for ahl (16-bit operand, n = 8).
// The testbench plays the operand register: on a rising edge it loads a new
// operand only while gating_n is high, as the gated register clock would.
// Operands are drawn with a uniformly random number of zero bits. A
// reference model evaluates the judging rule on every falling edge:
// one cycle when #zeros > n while fresh, > n + 1 once aged; gating_n low for
// at most one cycle. After 3000 cycles four error pulses age the circuit and
// the stricter rule must take over. The test counts one- and two-cycle
// operations and operands with exactly n + 1 zeros before and after aging.
module tb_ahl;

  localparam int M = 16;
  localparam int N = 8;

  logic         clk = 1'b0, rst_n = 1'b1, op_done = 1'b0, error = 1'b0;
  logic [M-1:0] opnd = '0;
  logic         gating_n, aged;

  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_border_fresh = 0, n_border_aged = 0;

  ahl u_dut (.clk, .rst_n, .opnd, .op_done, .error, .gating_n, .aged);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
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

  function automatic logic [M-1:0] with_zeros(input int nz);
    logic [M-1:0] v;
    int           k;
    v = '1;
    while (nz > 0) begin
      k = int'($urandom_range(M - 1, 0));
      if (v[k]) begin v[k] = 1'b0; nz--; end
    end
    return v;
  endfunction

  function automatic int zeros(input logic [M-1:0] v);
    int z = 0;
    for (int k = 0; k < M; k++) if (!v[k]) z++;
    return z;
  endfunction

  initial begin
    logic g_m;
    logic aged_m;
    int   errs;
    g_m = 1'b1; aged_m = 1'b0; errs = 0;
    #1 rst_n = 1'b0;   // reset edge
    #1;
    check(gating_n, 1'b1, "gating_n in reset");
    rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      // Rising edge: load a new operand if the clock is not gated.
      @(posedge clk);
      if (error) begin
        errs++;
        if (errs == 4) aged_m = 1'b1;
      end
      error <= (c >= 3000 && c < 3004);
      if (g_m) opnd <= with_zeros(int'($urandom_range(M, 0)));
      // Falling edge: the judgement.
      @(negedge clk);
      if (g_m) begin
        if (zeros(opnd) > (aged_m ? N + 1 : N)) n_short++;
        else                                     n_long++;
        if (zeros(opnd) == N + 1) begin
          if (aged_m) n_border_aged++;
          else        n_border_fresh++;
        end
      end
      g_m = (zeros(opnd) > (aged_m ? N + 1 : N)) | ~g_m;
      #1;
      check(gating_n, g_m, "gating_n");
      check(aged, aged_m, "aged");
    end
    check(n_short > 500 && n_long > 500 && n_border_fresh > 20 && n_border_aged > 20, 1'b1, "coverage");
    $display("one-cycle=%0d two-cycle=%0d n+1 zeros fresh=%0d aged=%0d",
             n_short, n_long, n_border_fresh, n_border_aged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
