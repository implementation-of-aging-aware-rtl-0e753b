// Self-checking testbench for ks_adder.
// The default 8-bit adder is checked exhaustively (every a, b and carry-in)
// against the + operator; a 16-bit and a 5-bit instance (the latter gives a
// prefix tree whose width is not a power of two) get random and corner
// vectors.
module tb_ks_adder;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;

  ks_adder u_dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  ks_adder #(.WIDTH(16)) u_dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  ks_adder #(.WIDTH(5))  u_dut5  (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  task automatic check(input logic [16:0] got, input logic [16:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(c);
          #1;
          check({8'b0, co8, s8}, 17'(x + y + c), "ks8");
        end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (n == 0) begin a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; end
      if (n == 1) begin a16 = 16'hFFFF; b16 = 16'hFFFF; ci16 = 1'b1; end
      if (n == 2) begin a16 = 16'h5555; b16 = 16'hAAAA; ci16 = 1'b0; end
      a5 = 5'($urandom); b5 = 5'($urandom); ci5 = 1'($urandom);
      #1;
      check({co16, s16}, 17'(a16) + 17'(b16) + 17'(ci16), "ks16");
      check({11'b0, co5, s5}, 17'(a5) + 17'(b5) + 17'(ci5), "ks5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
