// mod_add: combinational adder modulo M.
//
// Both residues a and b lie in [0, M-1]. Two additions run side by side:
// the plain sum a+b and the three-term sum a+b-M. When the three-term sum
// is negative, a+b was already below M and is the result; otherwise the
// three-term sum is. This is the structure of the source design's modulo
// adder: two ceil(log2 M)-bit adders and a multiplexer driven by a sign.
//
// The filter uses it with M = m (residue additions in the converters) and
// with M = m-1 (index additions in the isomorphic multiplier), so M need
// not be prime and may be a power of two.
//
// Interface: a, b, s are $clog2(M) bits wide. Purely combinational, no
// clock. Inputs outside [0, M-1] give an unspecified result.
module mod_add #(
  parameter int unsigned M = 13
) (
  input  logic [$clog2(M)-1:0] a,
  input  logic [$clog2(M)-1:0] b,
  output logic [$clog2(M)-1:0] s
);
  localparam int W = $clog2(M);

  logic        [W-1:0] sum_ab;   // a + b, only used when below M
  logic signed [W+1:0] sum_abm;  // a + b - M

  always_comb begin
    sum_ab  = a + b;
    sum_abm = $signed({2'b00, a}) + $signed({2'b00, b}) - $signed((W+2)'(M));
    if (sum_abm[W+1]) s = sum_ab;
    else              s = sum_abm[W-1:0];
  end

endmodule
