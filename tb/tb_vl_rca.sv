// Self-checking testbench for vl_rca, exhaustive over a, b and cin.
// For each pattern the testbench checks sum and cout against the + operator
// and hold against the rule (a4 xor b4)(a5 xor b5) on bits counted from 1.
// It also measures, independently of the hold rule, the longest carry path
// in full-adder delays (a carry born at a generating bit, or at cin, and
// carried through a run of propagating bits, plus the sum of the bit where
// it stops) and checks that every pattern with hold = 0 finishes within
// the 5-unit cycle and that patterns longer than 5 units exist. Finally the
// share of hold = 1 patterns must be 1/4, giving an average latency of
// 6.25 units against 8 for a fixed-latency adder.
module tb_vl_rca;

  logic [7:0] a, b, sum;
  logic       cin, cout, hold;

  int checks = 0, failures = 0;
  int n_hold = 0, n_long = 0, n_total = 0;

  vl_rca u_dut (.a, .b, .cin, .sum, .cout, .hold);

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h cin=%b: got %h expected %h", what, a, b, cin, got, exp);
    end
  endtask

  // Longest carry path, in full-adder delays.
  function automatic int carry_path(input logic [7:0] x, input logic [7:0] y, input logic ci);
    int best = 1, run;
    for (int s = -1; s < 8; s++) begin
      if (s == -1 ? ci : (x[s] & y[s])) begin
        run = (s == -1) ? 0 : 1;
        for (int k = s + 1; k < 8; k++) begin
          run++;                          // the carry reaches bit k
          if (!(x[k] ^ y[k])) break;      // and stops there
        end
        if (run > best) best = run;
      end
    end
    return best;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(x); b = 8'(y); cin = 1'(c);
          #1;
          n_total++;
          check({cout, sum}, 9'(x + y + c), "sum");
          check(9'(hold), 9'((a[3] ^ b[3]) & (a[4] ^ b[4])), "hold");
          d = carry_path(a, b, cin);
          if (d > 5) n_long++;
          if (!hold) check(9'(d <= 5), 9'(1), "hold=0 path within 5 units");
          if (hold) n_hold++;
        end
    check(9'(n_hold * 4 == n_total), 9'(1), "hold share 1/4");
    check(9'(n_long > 0), 9'(1), "paths over 5 units exist");
    $display("patterns=%0d hold=%0d over-5-units=%0d average latency=%0.2f units",
             n_total, n_hold, n_long, (5.0 * (n_total - n_hold) + 10.0 * n_hold) / n_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
