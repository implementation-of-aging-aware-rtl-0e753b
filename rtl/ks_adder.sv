// Kogge-Stone parallel-prefix adder with carry-in and carry-out.
//
// This is the final carry-propagate adder of the multiplier, used in place
// of a ripple-carry row. It follows the classic Kogge-Stone structure:
//   * pre-processing ("square" cells): per bit, generate g = a & b and
//     propagate p = a ^ b;
//   * prefix tree: ceil(log2(WIDTH+1)) levels; at level k every position i
//     with i >= 2^k combines with position i - 2^k ("big circle" cell:
//     G = Gi | Pi & Gj, P = Pi & Pj), all other positions pass their pair on
//     unchanged ("small circle" cell);
//   * post-processing ("triangle" cells): sum_i = p_i ^ carry into bit i.
// The carry-in is folded in as an extra prefix position below bit 0 with
// generate = cin and propagate = 0, so carry into bit i is the group
// generate of positions [-1 .. i-1]. With WIDTH = 8 this gives the nine
// columns and four prefix levels of an 8-bit Kogge-Stone adder.
//
// Interface: purely combinational. a, b, cin in; sum, cout out.
// WIDTH defaults to 8, the size drawn for the 8x8 multiplier.
module ks_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // Prefix positions 0..WIDTH: position 0 is the carry-in, position i+1 is bit i.
  localparam int unsigned N      = WIDTH + 1;
  localparam int unsigned LEVELS = aam_pkg::ceil_log2(N);

  logic [N-1:0] g [LEVELS+1];
  logic [N-1:0] p [LEVELS+1];
  logic [WIDTH-1:0] p_bit;

  // Square cells.
  assign p_bit = a ^ b;
  assign g[0]  = {a & b, cin};
  assign p[0]  = {p_bit, 1'b0};

  // Prefix tree: big circles where a partner exists, small circles elsewhere.
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    for (genvar i = 0; i < N; i++) begin : g_pos
      if (i >= D) begin : g_black
        assign g[k+1][i] = g[k][i] | (p[k][i] & g[k][i-D]);
        assign p[k+1][i] = p[k][i] & p[k][i-D];
      end else begin : g_buf
        assign g[k+1][i] = g[k][i];
        assign p[k+1][i] = p[k][i];
      end
    end
  end

  // Triangle cells: carry into bit i is the group generate at position i.
  assign sum  = p_bit ^ g[LEVELS][WIDTH-1:0];
  assign cout = g[LEVELS][WIDTH];

endmodule
