// 8-bit ripple-carry adder with variable-latency hold logic.
//
// This small adder shows the variable-latency idea the multiplier is built
// on. If every full adder costs one delay unit, the adder's worst case is 8
// units, but a long carry chain needs bits 4 and 5 (counting from 1, i.e.
// indices 3 and 4 here) both to propagate. The clock period is therefore set
// to 5 units, and the hold logic
//     hold = (a[3] ^ b[3]) & (a[4] ^ b[4])
// flags the patterns that may need longer: with hold = 0 no carry chain
// crosses both bits, so every path is at most 5 units long; with hold = 1
// the addition is given two cycles. With random inputs hold is 1 for a
// quarter of the patterns, so the average latency is
// 0.75 * 5 + 0.25 * 10 = 6.25 units instead of 8.
//
// Interface: purely combinational; a, b, cin in; sum, cout and hold out.
// A controller uses hold to wait one more cycle before taking sum.
module vl_rca (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout,
  output logic       hold
);

  logic [8:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < 8; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[8];

  assign hold = (a[3] ^ b[3]) & (a[4] ^ b[4]);

endmodule
