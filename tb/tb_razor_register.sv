// Self-checking testbench for razor_register (default 32 bits).
// Each 10 ns cycle: clk rises at +0 and clk_del at +2. New data is presented
// before the clk edge; in a late cycle some bits change only between the clk
// and clk_del edges. A reference model predicts q and error: error is raised
// only in the cycle after a capture, and the register must restore the late
// value by itself on the next edge and not flag the restored value again.
module tb_razor_register;

  localparam int W = 32;

  logic         clk = 1'b0, clk_del = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, q;
  logic         error;

  int checks = 0, failures = 0;
  int n_late = 0, n_err = 0, n_hold = 0, n_capture = 0;

  razor_register u_dut (.clk, .clk_del, .rst_n, .en, .d, .q, .error);

  logic [W-1:0] main_m, shadow_m, flip;
  logic         chk_m, err_m;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
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
    main_m = '0; shadow_m = '0; chk_m = 1'b0;
    #1 rst_n = 1'b0;   // reset edge
    #2;
    check(q, '0, "q in reset");
    rst_n = 1'b1;
    #2;
    for (int c = 0; c < 4000; c++) begin
      en = ($urandom_range(3, 0) != 0);
      d  = W'({$urandom, $urandom});
      flip = '0;
      if ($urandom_range(3, 0) == 0) flip[$urandom_range(W - 1, 0)] = 1'b1;
      if ($urandom_range(7, 0) == 0) flip = flip | W'($urandom);
      err_m = chk_m & |(main_m ^ shadow_m);
      #5;
      clk = 1'b1;
      if (err_m)   main_m = shadow_m;
      else if (en) begin main_m = d; n_capture++; end
      else         n_hold++;
      chk_m = en & ~err_m;
      #1;
      if (flip != '0) begin d = d ^ flip; n_late++; end
      #1;
      clk_del = 1'b1;
      shadow_m = d;
      #2;
      check(q, main_m, "q");
      err_m = chk_m & |(main_m ^ shadow_m);
      check(W'(error), W'(err_m), "error");
      if (err_m) n_err++;
      #1;
      clk = 1'b0;
      #2;
      clk_del = 1'b0;
    end
    check(W'(n_late > 200 && n_err > 100 && n_hold > 200 && n_capture > 1000), W'(1), "coverage");
    $display("captures=%0d late=%0d errors=%0d holds=%0d", n_capture, n_late, n_err, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
