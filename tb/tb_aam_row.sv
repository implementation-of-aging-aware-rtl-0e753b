// End-to-end, self-checking testbench of aging_aware_multiplier configured
// with a row-bypassing array (16 x 16, n = 8, aging window of 32 operations,
// threshold of 4 errors). The adaptive hold logic then judges the
// multiplicator instead of the multiplicand. Otherwise identical to the
// default-configuration testbench, tb_aging_aware_multiplier.
//
// A source keeps offering operations (about one in ten is idle) and a
// cycle-level reference model predicts, every rising edge, in_ready, error,
// out_valid, aged and the product (checked against md * mr). The model
// evaluates the hold rule on every falling edge.
//
// Aging is emulated: RTL has no path delays, so after cycle AGING_START a
// pattern that ran in one cycle with exactly n + 1 zero bits in its
// multiplicator (the slowest pattern still judged short) is treated as an
// aged, late path: right after its capture edge one main Razor flip-flop is
// forced to a stale value, which is what a late arrival leaves there. The
// Razor register must flag it, restore the result, hold the next pattern
// for re-execution, and after four errors in one window the AHL must move
// to the stricter rule, after which such patterns take two cycles and no
// further errors are injected.
//
// Latency, counted from the edge that takes an operation to the edge that
// sees out_valid: 2 cycles for a one-cycle pattern, 3 for a two-cycle one.
// Mechanisms counted (each must occur): one-cycle and two-cycle operations,
// Razor errors with restore, re-execution holds, the switch to the aged
// rule, n + 1-zero patterns run in two cycles after it, idle cycles, and the
// pattern 0xD295 x 0xAF25 = 0x90124A89. The side-by-side 8-bit
// variable-latency adder gets random vectors every cycle.
module tb_aam_row;

  localparam int M           = 16;
  localparam int N           = M / 2;
  localparam int WINDOW      = 32;
  localparam int THR         = 4;
  localparam bit JUDGE_MR    = 1'b1;    // row bypassing judges mr
  localparam int CYCLES      = 4000;
  localparam int AGING_START = 800;

  logic           clk = 1'b0, clk_del, rst_n = 1'b1;
  logic           in_valid = 1'b0;
  logic [M-1:0]   md = '0, mr = '0;
  logic           in_ready, out_valid, error, re_execute, aged;
  logic [2*M-1:0] product;

  // Side-by-side 8-bit variable-latency adder: random vectors, checked
  // against + and the hold rule on bits 4 and 5 (counted from 1).
  logic [7:0] rca_a = '0, rca_b = '0, rca_sum;
  logic       rca_cin = 1'b0, rca_cout, rca_hold;
  int         n_rca_hold = 0;

  assign clk_del = clk;   // zero-delay logic: the shadow samples with clk

  aging_aware_multiplier #(.BYPASS(aam_pkg::BYPASS_ROW)) dut (
    .clk, .clk_del, .rst_n, .in_valid, .md, .mr,
    .in_ready, .out_valid, .product, .error, .re_execute, .aged,
    .rca_a, .rca_b, .rca_cin, .rca_sum, .rca_cout, .rca_hold
  );

  always #5 clk = ~clk;


  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_err = 0, n_hold = 0, n_idle = 0;
  int n_border_aged = 0, n_example = 0, n_results = 0;
  int cyc = 0;

  task automatic check(input logic [2*M-1:0] got, input logic [2*M-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d: got %h expected %h", what, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int zeros(input logic [M-1:0] v);
    int z = 0;
    for (int k = 0; k < M; k++) if (!v[k]) z++;
    return z;
  endfunction

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

  // Emulate a late arrival on the capture that just happened.
  task automatic inject_late();
    logic v;
    #1;
    v = dut.u_razor.g_bit[0].u_ff.q_main;
    force dut.u_razor.g_bit[0].u_ff.q_main = ~v;
    #1;
    release dut.u_razor.g_bit[0].u_ff.q_main;
  endtask

  // Reference model state.
  typedef struct {
    logic [M-1:0] md;
    logic [M-1:0] mr;
    logic         v;
    int           took;      // cycle of the edge that took it
    logic         long_op;   // judged two-cycle when it was loaded
    logic         disturbed; // hit by an error or held for re-execution
  } op_t;

  op_t  opr_m, res_m;
  logic g_m = 1'b1, err_now = 1'b0, aged_m = 1'b0;
  int   opc_m = 0, errc_m = 0;
  logic example_taken = 1'b0;

  function automatic logic judge_short(input op_t o, input logic agd);
    return zeros(JUDGE_MR ? o.mr : o.md) > (agd ? N + 1 : N);
  endfunction

  // Falling edge: the hold rule.
  always @(negedge clk) begin
    if (rst_n) g_m <= judge_short(opr_m, aged_m) | ~g_m;
  end

  // Rising edge: compare, then advance the model and drive the next inputs.
  always @(posedge clk) begin
    logic exp_ld, exp_ov, op_done, capt, inject;
    if (rst_n) begin
      cyc++;
      exp_ld = g_m & ~err_now;
      exp_ov = res_m.v & ~err_now;
      check((2*M)'(in_ready),   (2*M)'(exp_ld),  "in_ready");
      check((2*M)'(error),      (2*M)'(err_now), "error");
      check((2*M)'(re_execute), (2*M)'(err_now), "re_execute");
      check((2*M)'(out_valid),  (2*M)'(exp_ov),  "out_valid");
      check((2*M)'(aged),       (2*M)'(aged_m),  "aged");
      if (exp_ov) begin
        n_results++;
        check(product, (2*M)'(res_m.md) * (2*M)'(res_m.mr), "product");
        if (res_m.md == M'('hD295) && res_m.mr == M'('hAF25)) begin
          n_example++;
          check(product, (2*M)'('h90124A89), "example product");
        end
        if (!res_m.disturbed) begin
          check((2*M)'(cyc - res_m.took), (2*M)'(res_m.long_op ? 3 : 2), "latency");
          if (res_m.long_op) n_long++;
          else               n_short++;
          if (res_m.long_op && aged_m && zeros(JUDGE_MR ? res_m.mr : res_m.md) == N + 1)
            n_border_aged++;
        end
      end
      // Aging indicator model.
      op_done = exp_ov;
      if (err_now && errc_m == THR - 1) aged_m = 1'b1;
      if (op_done && opc_m == WINDOW - 1) begin
        opc_m = 0; errc_m = 0;
      end else begin
        if (op_done) opc_m++;
        if (err_now && errc_m != THR) errc_m++;
      end
      // Razor register and operand registers.
      capt   = g_m & ~err_now;
      inject = 1'b0;
      if (err_now) begin
        n_err++;
        res_m.disturbed = 1'b1;
        opr_m.disturbed = 1'b1;
        n_hold++;
      end else if (g_m) begin
        res_m = opr_m;
        // A one-cycle pattern at the edge of the short class turns late.
        inject = opr_m.v && !opr_m.long_op && cyc >= AGING_START &&
                 zeros(JUDGE_MR ? opr_m.mr : opr_m.md) == N + 1;
      end else begin
        res_m.v = 1'b0;
      end
      if (exp_ld) begin
        if (!in_valid) n_idle++;
        opr_m.md        = md;
        opr_m.mr        = mr;
        opr_m.v         = in_valid;
        opr_m.took      = cyc;
        opr_m.disturbed = 1'b0;
        opr_m.long_op   = !judge_short(opr_m, aged_m);
      end
      err_now = capt & inject;
      if (inject) begin
        res_m.disturbed = 1'b1;
        fork inject_late(); join_none
      end
      check((2*M)'({rca_cout, rca_sum}), (2*M)'(9'(rca_a) + 9'(rca_b) + 9'(rca_cin)), "rca sum");
      check((2*M)'(rca_hold), (2*M)'((rca_a[3] ^ rca_b[3]) & (rca_a[4] ^ rca_b[4])), "rca hold");
      if (rca_hold) n_rca_hold++;
      rca_a   <= 8'($urandom);
      rca_b   <= 8'($urandom);
      rca_cin <= 1'($urandom);
      // Next operation offered by the source.
      if (exp_ld && in_valid && md == M'('hD295) && mr == M'('hAF25)) example_taken = 1'b1;
      in_valid <= ($urandom_range(9, 0) != 0);
      if (cyc >= 5 && !example_taken) begin
        in_valid <= 1'b1;
        md <= M'('hD295); mr <= M'('hAF25);
      end else if (cyc >= AGING_START && $urandom_range(2, 0) == 0) begin
        if (JUDGE_MR) begin md <= M'($urandom); mr <= with_zeros(N + 1); end
        else          begin md <= with_zeros(N + 1); mr <= M'($urandom); end
      end else begin
        md <= with_zeros(int'($urandom_range(M, 0)));
        mr <= with_zeros(int'($urandom_range(M, 0)));
      end
    end
  end

  initial begin
    opr_m = '{md: '0, mr: '0, v: 1'b0, took: 0, long_op: 1'b0, disturbed: 1'b1};
    res_m = opr_m;
    #1 rst_n = 1'b0;   // reset edge
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (cyc == CYCLES);
    @(negedge clk);
    check((2*M)'(n_short > 100), 1, "one-cycle operations seen");
    check((2*M)'(n_long > 100), 1, "two-cycle operations seen");
    check((2*M)'(n_err >= THR), 1, "Razor errors seen");
    check((2*M)'(n_hold >= THR), 1, "re-execution holds seen");
    check((2*M)'(aged_m), 1, "aged rule reached");
    check((2*M)'(n_border_aged > 10), 1, "n+1-zero patterns run in two cycles after aging");
    check((2*M)'(n_idle > 10), 1, "idle cycles seen");
    check((2*M)'(n_example == 1), 1, "example pattern seen");
    check((2*M)'(n_rca_hold > 100), 1, "adder hold seen");
    $display("results=%0d one-cycle=%0d two-cycle=%0d razor-errors=%0d holds=%0d idle=%0d n+1-after-aging=%0d",
             n_results, n_short, n_long, n_err, n_hold, n_idle, n_border_aged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
