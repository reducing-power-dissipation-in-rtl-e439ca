// sum_tree: pipelined binary adder tree that sums the N tap products of one
// modular filter.
//
// The source design only states that the tap products are summed in a tree
// whose output is then reduced modulo m; the shape here is this design's
// own. Sums are kept in plain binary, wide enough never to overflow
// (WIN + $clog2(N) bits), so the single modulo reduction after the tree is
// exact. The tree has $clog2(N) levels of two-input adders; a register
// follows every LPS levels and the last level, so the latency is
// STAGES = ceil($clog2(N) / LPS) clocks. Missing leaves (N not a power of
// two) are zero.
//
// Interface: in_data[N] of WIN bits, in_valid; sum of WIN+$clog2(N) bits
// and out_valid, STAGES edges later. One new set of operands per clock.
// rst (synchronous) clears the valid pipeline only. N must be at least 2.
module sum_tree #(
  parameter int N   = 64,
  parameter int WIN = 6,
  parameter int LPS = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [WIN-1:0]             in_data [N],
  output logic                       out_valid,
  output logic [WIN+$clog2(N)-1:0]   sum
);
  localparam int L      = $clog2(N);
  localparam int WOUT   = WIN + L;
  localparam int STAGES = (L + LPS - 1) / LPS;

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int NL = 2**(L - l);
    logic [WOUT-1:0] prev [2*NL];
    logic [WOUT-1:0] node [NL];

    if (l == 1) begin : g_leaves
      for (genvar i = 0; i < 2*NL; i++) begin : g_leaf
        if (i < N) begin : g_used
          assign prev[i] = WOUT'(in_data[i]);
        end else begin : g_pad
          assign prev[i] = '0;
        end
      end
    end else begin : g_inner
      assign prev = g_lvl[l-1].node;
    end

    if (l % LPS == 0 || l == L) begin : g_reg
      always_ff @(posedge clk)
        for (int i = 0; i < NL; i++) node[i] <= prev[2*i] + prev[2*i+1];
    end else begin : g_comb
      always_comb
        for (int i = 0; i < NL; i++) node[i] = prev[2*i] + prev[2*i+1];
    end
  end

  assign sum = g_lvl[L].node[0];

  logic [STAGES-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else begin
      vpipe[0] <= in_valid;
      for (int s = 1; s < STAGES; s++) vpipe[s] <= vpipe[s-1];
    end
  end
  assign out_valid = vpipe[STAGES-1];

endmodule
