// qrns_to_rns: inverse QRNS map for one prime modulus M.
//
// From the QRNS pair (Z, Zhat) of a complex value, the real and imaginary
// residues are
//   z_R = <2^-1 * (Z + Zhat)>_M
//   z_I = <2^-1 * q^-1 * (Z - Zhat)>_M
// with 2^-1 and q^-1 the inverses of 2 and of q modulo M, and q the same
// root of q*q = -1 used by the input converter (bin_to_qrns). The formula
// is that of the source design; the sum and difference use modulo-M adders
// and the multiplications by the two constants are synthesized as constant
// remainder logic, which is this design's choice.
//
// Interface: z, zh residues in; re, im residues ($clog2(M) bits) out with
// out_valid, one clock edge after in_valid. rst clears out_valid only.
module qrns_to_rns #(
  parameter int unsigned M = 13
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [$clog2(M)-1:0] z,
  input  logic [$clog2(M)-1:0] zh,
  output logic                 out_valid,
  output logic [$clog2(M)-1:0] re,
  output logic [$clog2(M)-1:0] im
);
  localparam int W     = $clog2(M);
  localparam int PW    = 2 * W;
  localparam int Q     = qrns_pkg::sqrt_neg1(M);
  localparam int INV2  = qrns_pkg::inv_mod(2, M);
  localparam int INV2Q = (INV2 * qrns_pkg::inv_mod(Q, M)) % M;

  logic [W-1:0]  neg_zh, sum_z, dif_z;
  logic [PW-1:0] p_re, p_im;

  assign neg_zh = (zh == '0) ? '0 : W'(M) - zh;

  mod_add #(.M(M)) u_sum (.a(z), .b(zh),     .s(sum_z));
  mod_add #(.M(M)) u_dif (.a(z), .b(neg_zh), .s(dif_z));

  assign p_re = PW'(sum_z) * PW'(INV2);
  assign p_im = PW'(dif_z) * PW'(INV2Q);

  always_ff @(posedge clk) begin
    re <= W'(p_re % PW'(M));
    im <= W'(p_im % PW'(M));
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

endmodule
