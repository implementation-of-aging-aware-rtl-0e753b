// WIDTH-bit register of Razor flip-flops with a common error output.
//
// Each bit is a razor_ff. The per-bit error flags are ORed into one error
// signal, which is qualified by chk: a comparison is meaningful only in the
// cycle after the main flip-flops actually captured d. When error is high,
// the register restores itself: on the next clk edge every main flip-flop
// loads its shadow latch, so the correct value appears one cycle late, and
// chk drops so the restored value is not compared again.
//
// Timing: d is captured on the rising clk edge when en is high; error is
// valid once clk_del has risen in the following cycle and stays valid until
// the next clk edge, at which the restore happens.
//
// Interface: clk, clk_del, rst_n (asynchronous), en, d[WIDTH]; q[WIDTH],
// error. WIDTH defaults to 32, the 2m product bits of a 16 x 16 multiplier.
module razor_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             clk_del,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             error
);

  logic [WIDTH-1:0] err_bit;
  logic             chk;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    razor_ff u_ff (
      .clk     (clk),
      .clk_del (clk_del),
      .rst_n   (rst_n),
      .en      (en),
      .restore (error),
      .d       (d[k]),
      .q       (q[k]),
      .err     (err_bit[k])
    );
  end

  // chk: the main flip-flops took d on the last edge (not a restore).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk <= 1'b0;
    else        chk <= en & ~error;
  end

  assign error = chk & (|err_bit);

endmodule
