// Aging indicator: decides from the Razor error rate that the multiplier has
// aged, so the adaptive hold logic must switch to its stricter judging block.
//
// Two counters run over an observation window of WINDOW operations: one
// counts completed operations (op_done), the other counts Razor errors. When
// the operation counter reaches WINDOW both counters return to zero and a new
// window starts. If the error counter reaches ERR_THRESHOLD within a window,
// aged is set. Aging does not reverse, so aged stays set until reset.
//
// Timing: counters and aged update on the rising clk edge; aged goes high on
// the edge that registers the ERR_THRESHOLD-th error of a window.
//
// Interface: clk, rst_n (asynchronous), op_done and error (one pulse per
// event, sampled each cycle); aged. WINDOW and ERR_THRESHOLD are design
// choices, not figures of the original design.
module aging_indicator #(
  parameter int unsigned WINDOW        = 32,
  parameter int unsigned ERR_THRESHOLD = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic error,
  output logic aged
);

  localparam int unsigned OW = aam_pkg::ceil_log2(WINDOW + 1);
  localparam int unsigned EW = aam_pkg::ceil_log2(ERR_THRESHOLD + 1);

  logic [OW-1:0] op_cnt;
  logic [EW-1:0] err_cnt;
  logic          window_end;

  assign window_end = op_done && (op_cnt == OW'(WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else begin
      if (window_end)   op_cnt <= '0;
      else if (op_done) op_cnt <= op_cnt + 1'b1;

      if (window_end)                                 err_cnt <= '0;
      else if (error && err_cnt != EW'(ERR_THRESHOLD)) err_cnt <= err_cnt + 1'b1;

      if (error && err_cnt == EW'(ERR_THRESHOLD - 1)) aged <= 1'b1;
    end
  end

endmodule
