// bin_to_qrns: input converter from a two's complement complex sample to
// the index-coded QRNS pair of one prime modulus M (M = 4k+1).
//
// A complex value x_R + j*x_I is represented modulo M by the pair
//   X    = <x_R + q*x_I>_M
//   Xhat = <x_R - q*x_I>_M
// where q*q = -1 (mod M). This follows the source design, as does folding
// the isomorphic transformation into the input converter: since every tap
// multiplies the same (delayed) input, X and Xhat are turned into indices
// here, once, and a zero residue is sent as the special pattern M-1.
// The smallest root q and the smallest primitive radix are this design's
// choice.
//
// How: stage 1 reduces the signed parts modulo M (by adding a multiple of M
// that makes them non-negative and taking the remainder) and forms
// <q*x_I>_M. Stage 2 forms X and Xhat with two modulo-M adders and looks up
// their indices (iso_log_table).
//
// Timing: two register stages. A sample presented with in_valid at one
// clock edge appears on x_code/xh_code with out_valid two edges later.
// One sample per clock. rst (synchronous, active high) clears the valid
// pipeline only.
module bin_to_qrns #(
  parameter int unsigned M    = 13,
  parameter int          IN_W = qrns_pkg::IN_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic [$clog2(M)-1:0]   x_code,
  output logic [$clog2(M)-1:0]   xh_code
);
  localparam int W   = $clog2(M);
  localparam int Q   = qrns_pkg::sqrt_neg1(M);
  // Smallest multiple of M not below 2**(IN_W-1): adding it makes any
  // IN_W-bit signed value non-negative without changing it modulo M.
  localparam int OFF = ((2**(IN_W-1) + M - 1) / M) * M;
  localparam int UW  = IN_W + 2;

  // Stage 1: residues of the real part and of q times the imaginary part.
  logic [UW-1:0] re_off, im_off;
  logic [W-1:0]  r_re, r_im, r_qim;
  logic [W-1:0]  s1_re, s1_qim;
  logic          s1_valid;

  always_comb begin
    re_off = UW'($signed({{2{in_re[IN_W-1]}}, in_re}) + $signed(UW'(OFF)));
    im_off = UW'($signed({{2{in_im[IN_W-1]}}, in_im}) + $signed(UW'(OFF)));
    r_re   = W'(re_off % UW'(M));
    r_im   = W'(im_off % UW'(M));
    r_qim  = W'(({{(UW-W){1'b0}}, r_im} * UW'(Q)) % UW'(M));
  end

  always_ff @(posedge clk) begin
    s1_re  <= r_re;
    s1_qim <= r_qim;
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
  end

  // Stage 2: X = re + q*im, Xhat = re - q*im, then index look-up.
  logic [W-1:0] neg_qim, x_res, xh_res, x_idx, xh_idx;

  assign neg_qim = (s1_qim == '0) ? '0 : W'(M) - s1_qim;

  mod_add #(.M(M)) u_add_x  (.a(s1_re), .b(s1_qim),  .s(x_res));
  mod_add #(.M(M)) u_add_xh (.a(s1_re), .b(neg_qim), .s(xh_res));

  iso_log_table #(.M(M)) u_log_x  (.res(x_res),  .code(x_idx));
  iso_log_table #(.M(M)) u_log_xh (.res(xh_res), .code(xh_idx));

  always_ff @(posedge clk) begin
    x_code  <= x_idx;
    xh_code <= xh_idx;
    if (rst) out_valid <= 1'b0;
    else     out_valid <= s1_valid;
  end

endmodule
