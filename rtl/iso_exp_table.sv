// iso_exp_table: inverse isomorphic transformation for one prime modulus M.
//
// Maps an index w in [0, M-2] to the residue r**w mod M, where r is the
// primitive radix of M (the smallest primitive root, chosen at
// elaboration). Codes from M-1 upwards are not indices and give 0. Built at
// elaboration and synthesized as logic.
//
// Interface: idx is $clog2(M) bits, res is $clog2(M) bits. Combinational.
module iso_exp_table #(
  parameter int unsigned M = 13
) (
  input  logic [$clog2(M)-1:0] idx,
  output logic [$clog2(M)-1:0] res
);
  localparam int W = $clog2(M);
  localparam int R = qrns_pkg::prim_root(M);

  logic [W-1:0] tab [2**W];

  for (genvar w = 0; w < 2**W; w++) begin : g_tab
    if (w < M - 1) begin : g_val
      assign tab[w] = W'(qrns_pkg::pow_mod(R, w, M));
    end else begin : g_none
      assign tab[w] = '0;
    end
  end

  assign res = tab[idx];

endmodule
