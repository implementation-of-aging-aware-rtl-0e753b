// Adaptive hold logic (AHL): predicts, from the operand that drives the
// bypassing, whether the multiplication needs one clock cycle or two, and
// tightens that prediction once the circuit has aged.
//
// Structure:
//   * two judging blocks count the zeros of the operand: the first says
//     "one cycle is enough" when the count exceeds N_ZEROS, the second when
//     it exceeds N_ZEROS + 1 (more zeros mean more bypassed adders and a
//     shorter path);
//   * a 2:1 multiplexer picks the first block while the circuit is fresh and
//     the second once the aging indicator reports aging;
//   * an OR gate combines the multiplexer output with the inverted output
//     of a D flip-flop clocked on the falling clock edge; the flip-flop's
//     true output is gating_n.
// gating_n = 1 lets the operand registers load on the next rising edge.
// gating_n = 0 holds them for one extra cycle, giving the current operation
// two cycles. Because the inverted output feeds the OR gate, gating_n can be
// low for at most one cycle at a time.
// The aging indicator (aging_indicator) counts Razor errors per window of
// completed operations.
//
// Timing: the operand is loaded on a rising edge; the judgement is taken by
// the flip-flop on the following falling edge, in time for the next rising
// edge. rst_n (asynchronous) sets the flip-flop (gating_n = 1).
//
// Interface: clk, rst_n, opnd[M] (the multiplicand for a column-bypassing
// array, the multiplicator for a row-bypassing one), op_done and error (to
// the aging indicator); gating_n, aged.
module ahl #(
  parameter int unsigned M             = 16,
  parameter int unsigned N_ZEROS       = 8,
  parameter int unsigned AGING_WINDOW  = 32,
  parameter int unsigned AGING_ERR_THR = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] opnd,
  input  logic         op_done,
  input  logic         error,
  output logic         gating_n,
  output logic         aged
);

  localparam int unsigned ZW = aam_pkg::ceil_log2(M + 1);

  logic [ZW-1:0] zeros;
  logic          judge_fresh;  // #0s > n
  logic          judge_aged;   // #0s > n + 1
  logic          one_cycle;
  logic          d_next;

  always_comb begin
    zeros = '0;
    for (int unsigned k = 0; k < M; k++) zeros = zeros + ZW'(!opnd[k]);
  end

  assign judge_fresh = zeros > ZW'(N_ZEROS);
  assign judge_aged  = zeros > ZW'(N_ZEROS + 1);
  assign one_cycle   = aged ? judge_aged : judge_fresh;
  assign d_next      = one_cycle | ~gating_n;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) gating_n <= 1'b1;
    else        gating_n <= d_next;
  end

  aging_indicator #(
    .WINDOW        (AGING_WINDOW),
    .ERR_THRESHOLD (AGING_ERR_THR)
  ) u_aging_indicator (
    .clk     (clk),
    .rst_n   (rst_n),
    .op_done (op_done),
    .error   (error),
    .aged    (aged)
  );

endmodule
