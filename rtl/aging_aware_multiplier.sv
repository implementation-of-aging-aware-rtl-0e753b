// Aging-aware variable-latency multiplier (top level).
//
// An M x M unsigned multiplier whose clock period is set well below the
// worst-case delay of its array. Most operand patterns bypass enough
// full adders to finish in one cycle; the adaptive hold logic (AHL) spots
// the others by counting zeros in the operand that drives the bypassing and
// gives them two cycles. Razor flip-flops on the 2M product bits catch any
// pattern that was judged short but arrived late anyway (the typical symptom
// of transistor aging): the product is restored from the shadow latches a
// cycle later, the pattern in the operand registers is re-executed for an
// extra cycle, and the error is counted. When errors become frequent the AHL
// switches to a stricter judging threshold, so fewer patterns are run in one
// cycle and the error rate falls again.
//
// Data path: md/mr operand registers -> bypass_multiplier (column or row
// bypassing array with a Kogge-Stone final adder) -> razor_register ->
// product. The operand registers load when ld = gating_n & ~error; this clock
// enable stands for the AND gate that gates their clock. The Razor register
// captures on every rising edge where gating_n is high, i.e. at the end of
// the last cycle of an operation.
//
// Handshake: the source presents md, mr and in_valid; they are taken on the
// rising clk edge while in_ready is high (in_ready = ld; it can change at the
// falling edge and after clk_del rises, so sample it just before the rising
// edge). out_valid is high for one cycle, in the cycle after the result was
// captured, when product holds a result confirmed by the Razor check.
// Latency from the taking edge to out_valid: 1 cycle for a pattern judged
// short, 2 for one judged long, plus 1 when a Razor error is corrected.
// error and re_execute flag a timing error detected in the current cycle;
// aged reports that the AHL has switched to the stricter judging block.
//
// clk_del is the delayed clock of the Razor shadow latches. With zero-delay
// logic it must rise together with clk (see razor_ff).
//
// The rca_* ports belong to vl_rca, the small 8-bit variable-latency
// ripple-carry adder that shows the hold-logic principle on an adder; it is
// instantiated beside the multiplier and is independent of it.
//
// Defaults: M = 16 and a column-bypassing array. N_ZEROS (the judging
// threshold n) and the aging indicator's window and error threshold are
// design choices.
module aging_aware_multiplier
  import aam_pkg::*;
#(
  parameter int unsigned M             = 16,
  parameter bypass_e     BYPASS        = BYPASS_COLUMN,
  parameter int unsigned N_ZEROS       = M / 2,
  parameter int unsigned AGING_WINDOW  = 32,
  parameter int unsigned AGING_ERR_THR = 4
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [M-1:0]   md,
  input  logic [M-1:0]   mr,
  output logic           in_ready,
  output logic           out_valid,
  output logic [2*M-1:0] product,
  output logic           error,
  output logic           re_execute,
  output logic           aged,
  // Stand-alone 8-bit variable-latency ripple-carry adder (vl_rca)
  input  logic [7:0]     rca_a,
  input  logic [7:0]     rca_b,
  input  logic           rca_cin,
  output logic [7:0]     rca_sum,
  output logic           rca_cout,
  output logic           rca_hold
);

  logic [M-1:0]   md_q, mr_q;
  logic           op_valid_q;   // the operand registers hold a real operation
  logic           res_valid;    // the Razor register holds a real result
  logic           gating_n;
  logic           ld;
  logic [2*M-1:0] mult_out;

  assign ld       = gating_n & ~error;
  assign in_ready = ld;

  // Operand registers behind the gated clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_q       <= '0;
      mr_q       <= '0;
      op_valid_q <= 1'b0;
    end else if (ld) begin
      md_q       <= md;
      mr_q       <= mr;
      op_valid_q <= in_valid;
    end
  end

  bypass_multiplier #(
    .M      (M),
    .BYPASS (BYPASS)
  ) u_mult (
    .md      (md_q),
    .mr      (mr_q),
    .product (mult_out)
  );

  razor_register #(
    .WIDTH (2 * M)
  ) u_razor (
    .clk     (clk),
    .clk_del (clk_del),
    .rst_n   (rst_n),
    .en      (gating_n),
    .d       (mult_out),
    .q       (product),
    .error   (error)
  );

  // Validity of the value in the Razor register. On an error the restored
  // value belongs to the same operation, so the flag is kept.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        res_valid <= 1'b0;
    else if (error)    res_valid <= res_valid;
    else if (gating_n) res_valid <= op_valid_q;
    else               res_valid <= 1'b0;
  end

  assign out_valid  = res_valid & ~error;
  assign re_execute = error;

  ahl #(
    .M             (M),
    .N_ZEROS       (N_ZEROS),
    .AGING_WINDOW  (AGING_WINDOW),
    .AGING_ERR_THR (AGING_ERR_THR)
  ) u_ahl (
    .clk      (clk),
    .rst_n    (rst_n),
    .opnd     ((BYPASS == BYPASS_COLUMN) ? md_q : mr_q),
    .op_done  (out_valid),
    .error    (error),
    .gating_n (gating_n),
    .aged     (aged)
  );


  // Protocol rules: the hold lasts one cycle at most, and a Razor error is
  // corrected by the very next edge, so it is never flagged twice in a row.
  a_hold_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !gating_n |=> gating_n);
  a_error_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    error |=> !error);

  // The 8-bit variable-latency adder that illustrates the hold-logic idea
  // sits beside the multiplier with its own ports; it shares nothing with it.
  vl_rca u_vl_rca (
    .a    (rca_a),
    .b    (rca_b),
    .cin  (rca_cin),
    .sum  (rca_sum),
    .cout (rca_cout),
    .hold (rca_hold)
  );

endmodule
