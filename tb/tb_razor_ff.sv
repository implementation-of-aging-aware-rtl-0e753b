// Self-checking testbench for razor_ff.
// Each 10 ns cycle: clk rises at +0, clk_del at +2, both fall half a period
// later. The data input either settles before the clk edge (on time) or
// changes between the clk and clk_del edges (late arrival, as an aged path
// would). A cycle-level reference model predicts q and err; whenever the
// model shows an error, the next edge is driven with restore, and the
// restored q must be the late value. Capture enable and reset are exercised.
module tb_razor_ff;

  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b1;
  logic en = 1'b0, restore = 1'b0, d = 1'b0;
  logic q, err;

  int checks = 0, failures = 0;
  int n_late = 0, n_err = 0, n_restore = 0, n_hold = 0;

  razor_ff u_dut (.clk, .clk_del, .rst_n, .en, .restore, .d, .q, .err);

  logic main_m, shadow_m;
  logic late;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    main_m = 1'b0; shadow_m = 1'b0;
    #1 rst_n = 1'b0;   // reset edge
    #2;
    check(q, 1'b0, "q in reset");
    check(err, 1'b0, "err in reset");
    rst_n = 1'b1;
    #2;
    for (int c = 0; c < 4000; c++) begin
      // Set-up phase, before the clk edge.
      late    = ($urandom_range(3, 0) == 0);
      en      = ($urandom_range(4, 0) != 0);
      restore = main_m ^ shadow_m;    // correct every detected error
      d       = 1'($urandom);
      #5;
      // clk edge.
      clk = 1'b1;
      if (restore)  begin main_m = shadow_m; n_restore++; end
      else if (en)  main_m = d;
      else          n_hold++;
      #1;
      if (late) begin d = ~d; n_late++; end   // arrives after clk
      #1;
      clk_del = 1'b1;
      shadow_m = d;
      #2;
      check(q, main_m, "q");
      check(err, main_m ^ shadow_m, "err");
      if (main_m ^ shadow_m) n_err++;
      #1;
      clk = 1'b0;
      #2;
      clk_del = 1'b0;
    end
    check(n_late > 100 && n_err > 50 && n_restore > 50 && n_hold > 100, 1'b1, "coverage");
    $display("late=%0d errors=%0d restores=%0d holds=%0d", n_late, n_err, n_restore, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
