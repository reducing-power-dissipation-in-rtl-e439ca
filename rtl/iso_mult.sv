// iso_mult: multiplier modulo a prime M by isomorphism.
//
// Both operands arrive already in index form: a nonzero residue n is
// carried as its index w with n = r**w mod M (r the primitive radix of M),
// and zero is carried as the special pattern M-1. The product of two
// nonzero residues is r**((w1 + w2) mod (M-1)), so a multiplication becomes
// an addition modulo M-1 (mod_add) followed by a look-up in the inverse
// isomorphism table (iso_exp_table). When either operand is the zero
// pattern there is no index; the adder is bypassed and the product is 0.
// This follows the tap multiplier of the source design; in the filter one
// operand is a coefficient stored in index form and the other is a delayed
// input sample converted to index form once at the filter input.
//
// Interface: x_code, c_code are $clog2(M)-bit index codes; p is the
// $clog2(M)-bit product residue. Combinational.
module iso_mult #(
  parameter int unsigned M = 13
) (
  input  logic [$clog2(M)-1:0] x_code,
  input  logic [$clog2(M)-1:0] c_code,
  output logic [$clog2(M)-1:0] p
);
  localparam int W  = $clog2(M);
  localparam int WI = $clog2(M - 1);   // index width, indices are in [0, M-2]
  localparam logic [W-1:0] ZERO_CODE = W'(M - 1);

  logic [WI-1:0] w_sum;
  logic [W-1:0]  w_code;
  logic [W-1:0]  r_val;
  logic          zero_op;

  mod_add #(.M(M - 1)) u_idx_add (
    .a (x_code[WI-1:0]),
    .b (c_code[WI-1:0]),
    .s (w_sum)
  );

  assign w_code = W'(w_sum);

  iso_exp_table #(.M(M)) u_exp (
    .idx (w_code),
    .res (r_val)
  );

  assign zero_op = (x_code == ZERO_CODE) || (c_code == ZERO_CODE);
  assign p       = zero_op ? '0 : r_val;

endmodule
