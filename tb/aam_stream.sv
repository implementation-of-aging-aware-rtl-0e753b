// Streaming driver and checker for one aging_aware_multiplier instance,
// used by tb_workload_patterns.
//
// Offers NOPS operations back to back (in_valid always high), either
// uniformly random or, with EXHAUSTIVE set and M = 8, every (md, mr) pair
// once. Every result is checked against md * mr. The latency of every
// operation, from the edge that takes it to the edge that sees out_valid,
// must be 2 cycles when the judged operand (md for column bypassing, mr for
// row bypassing) has more than M/2 zero bits and 3 cycles otherwise; no
// Razor error is expected since no late arrival is modelled. The counts are
// reported through the ports; done rises when the last result is checked.
module aam_stream #(
  parameter int unsigned     M          = 16,
  parameter aam_pkg::bypass_e BYPASS    = aam_pkg::BYPASS_COLUMN,
  parameter int unsigned     NOPS       = 65536,
  parameter bit              EXHAUSTIVE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_one,
  output int   n_two,
  output int   cycles
);

  localparam int N = M / 2;

  logic           in_valid, in_ready, out_valid, error, re_execute, aged;
  logic [M-1:0]   md, mr;
  logic [2*M-1:0] product;

  aging_aware_multiplier #(.M(M), .BYPASS(BYPASS)) dut (
    .clk, .clk_del(clk), .rst_n, .in_valid, .md, .mr,
    .in_ready, .out_valid, .product, .error, .re_execute, .aged,
    .rca_a('0), .rca_b('0), .rca_cin(1'b0), .rca_sum(), .rca_cout(), .rca_hold()
  );

  typedef struct {
    logic [M-1:0] md;
    logic [M-1:0] mr;
    int           took;
  } op_t;

  op_t q[$];
  int  issued = 0, received = 0;

  function automatic int zeros(input logic [M-1:0] v);
    int z = 0;
    for (int k = 0; k < M; k++) if (!v[k]) z++;
    return z;
  endfunction

  function automatic logic [M-1:0] pick_md(input int idx);
    return EXHAUSTIVE ? M'(idx >> 8) : M'($urandom);
  endfunction
  function automatic logic [M-1:0] pick_mr(input int idx);
    return EXHAUSTIVE ? M'(idx & 255) : M'($urandom);
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL M=%0d %s: %s at cycle %0d", M, BYPASS.name(), what, cycles);
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; n_one = 0; n_two = 0; cycles = 0;
    in_valid = 1'b0; md = '0; mr = '0;
  end

  always @(posedge clk) begin
    op_t o;
    int  lat;
    logic one;
    if (rst_n && !done) begin
      cycles++;
      checks++;
      if (error) fail("unexpected Razor error");
      if (out_valid) begin
        if (q.size() == 0) fail("result without operation");
        else begin
          o = q.pop_front();
          received++;
          checks++;
          if (product !== (2*M)'(o.md) * (2*M)'(o.mr)) fail("product");
          lat = cycles - o.took;
          one = zeros((BYPASS == aam_pkg::BYPASS_COLUMN) ? o.md : o.mr) > N;
          checks++;
          if (lat != (one ? 2 : 3)) fail($sformatf("latency %0d", lat));
          if (lat == 2) n_one++;
          else          n_two++;
          if (received == int'(NOPS)) done <= 1'b1;
        end
      end
      if (in_ready && in_valid) begin
        q.push_back('{md: md, mr: mr, took: cycles});
        issued++;
      end
      if (issued < int'(NOPS)) begin
        if (in_ready || !in_valid) begin
          in_valid <= 1'b1;
          md       <= pick_md(issued);
          mr       <= pick_mr(issued);
        end
      end else if (in_ready) begin
        in_valid <= 1'b0;
      end
    end
  end

endmodule
