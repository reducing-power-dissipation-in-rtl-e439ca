// iso_log_table: forward isomorphic transformation for one prime modulus M.
//
// Maps a residue n in [1, M-1] to its index w in [0, M-2], where
// n = r**w mod M and r is the primitive radix of M (the smallest primitive
// root, chosen at elaboration). Zero has no index and is mapped to the
// special zero pattern M-1, a value no real index takes; codes outside the
// residue range also map to it. The table is built at elaboration and is
// synthesized as logic, one entry per possible input code.
//
// Interface: res and code are $clog2(M) bits wide. Combinational.
module iso_log_table #(
  parameter int unsigned M = 13
) (
  input  logic [$clog2(M)-1:0] res,
  output logic [$clog2(M)-1:0] code
);
  localparam int W = $clog2(M);
  localparam int R = qrns_pkg::prim_root(M);

  logic [W-1:0] tab [2**W];

  for (genvar n = 0; n < 2**W; n++) begin : g_tab
    if (n == 0 || n >= M) begin : g_zero
      assign tab[n] = W'(M - 1);
    end else begin : g_idx
      assign tab[n] = W'(qrns_pkg::dlog(n, R, M));
    end
  end

  assign code = tab[res];

endmodule
