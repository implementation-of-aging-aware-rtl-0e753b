// Self-checking testbench for bypass_multiplier.
// The default instance (16 x 16, column bypassing) gets random operands,
// operands with a controlled number of zero bits, corner values and the
// pair 0xD295 x 0xAF25 = 0x90124A89. 8 x 8 column- and row-bypassing
// instances are checked exhaustively, and a 16 x 16 row-bypassing instance
// with random operands. The reference is the * operator.
module tb_bypass_multiplier;
  import aam_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [15:0] md16, mr16;
  logic [31:0] p16c, p16r;
  logic [7:0]  md8, mr8;
  logic [15:0] p8c, p8r;

  bypass_multiplier u_dut (.md(md16), .mr(mr16), .product(p16c));
  bypass_multiplier #(.M(16), .BYPASS(BYPASS_ROW))   u_row16 (.md(md16), .mr(mr16), .product(p16r));
  bypass_multiplier #(.M(8), .BYPASS(BYPASS_COLUMN)) u_col8  (.md(md8), .mr(mr8), .product(p8c));
  bypass_multiplier #(.M(8), .BYPASS(BYPASS_ROW))    u_row8  (.md(md8), .mr(mr8), .product(p8r));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Random value with exactly nz zero bits out of 16.
  function automatic logic [15:0] with_zeros(input int nz);
    logic [15:0] v;
    int          k;
    v = '1;
    while (nz > 0) begin
      k = int'($urandom_range(15, 0));
      if (v[k]) begin v[k] = 1'b0; nz--; end
    end
    return v;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    md16 = 16'hD295; mr16 = 16'hAF25;
    #1;
    check(p16c, 32'h90124A89, "example column");
    check(p16r, 32'h90124A89, "example row");
    for (int n = 0; n < 30000; n++) begin
      case (n % 4)
        0: begin md16 = 16'($urandom); mr16 = 16'($urandom); end
        1: begin md16 = with_zeros(n % 17); mr16 = 16'($urandom); end
        2: begin md16 = 16'($urandom); mr16 = with_zeros((n / 4) % 17); end
        default: begin
          md16 = (n & 8) ? 16'hFFFF : 16'($urandom);
          mr16 = (n & 16) ? 16'hFFFF : 16'h0000;
        end
      endcase
      #1;
      check(p16c, 32'(md16) * 32'(mr16), "col16");
      check(p16r, 32'(md16) * 32'(mr16), "row16");
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        md8 = 8'(x); mr8 = 8'(y);
        #1;
        check({16'b0, p8c}, 32'(x * y), "col8");
        check({16'b0, p8r}, 32'(x * y), "row8");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
