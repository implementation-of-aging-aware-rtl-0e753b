// One-bit Razor flip-flop: a flip-flop that detects and corrects its own
// late-arriving data.
//
// A main flip-flop samples d on the rising edge of clk. A shadow element
// samples the same d a little later, on the rising edge of the delayed clock
// clk_del, and holds it for a full cycle. If d was still settling when clk
// rose (a path slowed down by aging), the main flip-flop holds a stale value
// while the shadow holds the correct one; the XOR comparator then raises err.
// When the enclosing register asserts restore, a multiplexer in front of the
// main flip-flop loads the shadow value instead of d on the next clk edge,
// correcting the output one cycle late.
//
// The Razor scheme uses a shadow latch. Here the shadow is edge-triggered on
// clk_del: it samples at the same moment a latch would close and keeps the
// value until the restore edge, which a latch does only when the data path
// meets Razor's short-path (hold) constraint. An RTL model has no path
// delays, so the edge-triggered form is the one that behaves the same in
// simulation. As in any Razor design, d must stay stable from the rising
// edge of clk until clk_del rises; with zero-delay logic, clk_del must
// therefore rise in the same time step as clk unless a late arrival is being
// modelled.
//
// Interface: clk, clk_del, rst_n (asynchronous, clears the main flip-flop),
// en (capture d on this edge), restore (load the shadow value), d; q is the
// main flip-flop, err = q ^ shadow.
module razor_ff (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic en,
  input  logic restore,
  input  logic d,
  output logic q,
  output logic err
);

  logic q_main;
  logic shadow;

  // Main flip-flop with the restore multiplexer in front of it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q_main <= 1'b0;
    else if (restore) q_main <= shadow;
    else if (en)      q_main <= d;
  end

  // Shadow element on the delayed clock.
  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n) shadow <= 1'b0;
    else        shadow <= d;
  end

  assign q   = q_main;
  assign err = q_main ^ shadow;

endmodule
