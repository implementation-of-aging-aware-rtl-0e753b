// Unsigned M x M bypassing array multiplier with a Kogge-Stone final adder.
//
// The array is a carry-save array multiplier (one partial-product row per
// multiplicator bit) whose full-adder cells can be bypassed to save switching
// activity. Row 0 is the partial product md & {M{mr[0]}}. Rows j = 1..M-1
// each hold M full-adder cells; cell (i, j) sits at weight i + j and adds
// the sum bit coming down from above, the carry bit coming from the cell
// above-right and the partial product md[i] & mr[j]. Its sum goes down, its
// carry goes to the cell below-left. The state between rows is therefore a
// pair of 2M-bit vectors (sum, carry) whose total is the running product.
//
//   BYPASS_COLUMN: cell (i, j) is bypassed when multiplicand bit md[i] is 0.
//     The sum from the upper cell passes straight down and the carry out is
//     forced to 0. This is exact because every carry that reaches column i
//     was produced in column i, so with md[i] = 0 all three inputs but the
//     upper sum are 0.
//   BYPASS_ROW: the whole row j is bypassed when multiplicator bit mr[j] is
//     0. Both the sum and the carry vector pass down unchanged. A carry left
//     at the weight the bypassed row would have retired is picked up by a
//     short chain of extra adders on the low product bits.
//
// After the last row, the low M product bits are final (column mode) or are
// resolved by the extra low-side adders (row mode), and the high M bits are
// the sum of the two vectors' upper halves, formed by the Kogge-Stone adder
// instead of the ripple-carry row of a plain array multiplier.
//
// The multiplexers and tri-state input isolation of a real bypassing cell
// are expressed here only by their logical effect (the selected outputs);
// the power saving itself is a property of the gate-level implementation.
//
// Interface: purely combinational; md (multiplicand), mr (multiplicator),
// product = md * mr. M defaults to 16, the larger of the two sizes studied.
module bypass_multiplier
  import aam_pkg::*;
#(
  parameter int unsigned M      = 16,
  parameter bypass_e     BYPASS = BYPASS_COLUMN
) (
  input  logic [M-1:0]   md,
  input  logic [M-1:0]   mr,
  output logic [2*M-1:0] product
);

  logic [2*M-1:0] sum_vec;    // sum bits leaving the last array row
  logic [2*M-1:0] carry_vec;  // carry bits leaving the last array row

  // Carry-save array with bypassable cells.
  always_comb begin
    logic [2*M-1:0] s_cur, c_cur, s_nxt, c_nxt;
    logic           pp, en;
    int unsigned    w;
    s_cur = '0;
    c_cur = '0;
    for (int unsigned i = 0; i < M; i++) s_cur[i] = md[i] & mr[0];
    for (int unsigned j = 1; j < M; j++) begin
      s_nxt = s_cur;
      c_nxt = c_cur;
      for (int unsigned i = 0; i < M; i++) begin
        w  = i + j;
        pp = md[i] & mr[j];
        en = (BYPASS == BYPASS_COLUMN) ? md[i] : mr[j];
        if (en) begin
          s_nxt[w]   = s_cur[w] ^ c_cur[w] ^ pp;
          c_nxt[w+1] = (s_cur[w] & c_cur[w]) | (pp & (s_cur[w] ^ c_cur[w]));
          if (i == 0) c_nxt[w] = 1'b0;          // consumed by this cell
        end else if (BYPASS == BYPASS_COLUMN) begin
          s_nxt[w]   = s_cur[w];                // upper sum passes down
          c_nxt[w+1] = 1'b0;                    // carry gated by md[i]
        end
        // BYPASS_ROW with mr[j] = 0: sum and carry pass down unchanged.
      end
      s_cur = s_nxt;
      c_cur = c_nxt;
    end
    sum_vec   = s_cur;
    carry_vec = c_cur;
  end

  // Low product bits.
  logic lo_cout;

  if (BYPASS == BYPASS_COLUMN) begin : g_lo_column
    // No carry is left below weight M: the low bits are already final.
    assign product[M-1:0] = sum_vec[M-1:0];
    assign lo_cout        = 1'b0;
    always_comb assert (carry_vec[M-1:0] == '0)
      else $error("column-bypassing array left a carry below weight %0d", M);
  end else begin : g_lo_row
    // Extra adders that absorb carries stranded by bypassed rows.
    logic [M:0] rc;
    assign rc[0] = 1'b0;
    for (genvar k = 0; k < M; k++) begin : g_fa
      assign product[k] = sum_vec[k] ^ carry_vec[k] ^ rc[k];
      assign rc[k+1]    = (sum_vec[k] & carry_vec[k]) | (rc[k] & (sum_vec[k] ^ carry_vec[k]));
    end
    assign lo_cout = rc[M];
  end

  // High product bits: Kogge-Stone final adder. Its carry-out is always 0
  // because the product fits in 2M bits.
  logic hi_cout;

  ks_adder #(.WIDTH(M)) u_final_adder (
    .a    (sum_vec[2*M-1:M]),
    .b    (carry_vec[2*M-1:M]),
    .cin  (lo_cout),
    .sum  (product[2*M-1:M]),
    .cout (hi_cout)
  );

  always_comb assert (hi_cout == 1'b0)
    else $error("final adder overflowed the 2M-bit product");

endmodule
