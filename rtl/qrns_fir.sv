// qrns_fir: programmable complex FIR filter in the Quadratic Residue Number
// System (QRNS).
//
//   y(n) = sum_{k=0}^{TAPS-1} a_k * x(n-k)     (x, a, y complex)
//
// A complex product needs four real multiplications in two's complement.
// In QRNS each modulus m (a prime 4k+1) carries a complex value as two
// independent residues X = <x_R + q*x_I>_m and Xhat = <x_R - q*x_I>_m,
// with q*q = -1 mod m, so a complex product is two independent residue
// products. The filter therefore splits into two real filters (X side and
// Xhat side), each made of five small filters working in parallel, one per
// modulus of {5, 13, 17, 29, 41} (dynamic range about 20.3 bits). Inside
// those filters multiplication is done by isomorphism: residues are carried
// as discrete-logarithm indices and a product is an index addition.
//
// Datapath, per sample:
//   bin_to_qrns      (x5)  two's complement -> (X, Xhat) index codes    2 clk
//   rns_fir_channel  (x10) modular FIR, products, tree, reduction       1+T+1 clk
//   qrns_to_rns      (x5)  (Y, Yhat) -> real and imaginary residues     1 clk
//   crt_converter    (x2)  CRT to signed binary, real and imaginary     3 clk
// with T = ceil($clog2(TAPS)/2) adder tree stages. At TAPS = 64 the
// latency is LATENCY = 11 clock edges from a sample to the output that
// first contains it, and the filter accepts one sample per clock, as in
// the source design. The structure, moduli, sizes and the isomorphic
// multiplier follow the source design; pipelining, handshake and
// coefficient port are this design's choice.
//
// Interface:
//   in_valid, in_re, in_im  one 10-bit complex sample per clock; when
//                           in_valid is low nothing is consumed (bubble)
//   out_valid, out_re/im    21-bit signed result, LATENCY edges later
//   coef_we, coef_tap,      writes tap coef_tap. The coefficient is given
//   coef_code, coef_code_hat  in index form per modulus: for a_k,
//                           A = <a_R + q*a_I>_m and Ahat = <a_R - q*a_I>_m,
//                           each coded as its index w (A = r**w mod m) or as
//                           the zero pattern m-1 when the residue is 0.
//                           q and r are the smallest root of q*q = -1 and
//                           the smallest primitive root of each modulus.
// Results are exact when the true output lies in [-(M-1)/2, (M-1)/2],
// M = 1 313 845; outside that range they wrap modulo M.
// rst (synchronous, active high) clears the valid pipeline, the delay
// lines (to zero samples) and the coefficients (to zero).
module qrns_fir
  import qrns_pkg::*;
#(
  parameter int TAPS = 64
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  sample_t                 in_re,
  input  sample_t                 in_im,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_tap,
  input  code_t                   coef_code     [NMOD],
  input  code_t                   coef_code_hat [NMOD],
  output logic                    out_valid,
  output result_t                 out_re,
  output result_t                 out_im
);
  // Latency in clock edges: 2 + 1 + ceil($clog2(TAPS)/2) + 1 + 1 + 3,
  // which is 11 for TAPS = 64.

  code_t res_re [NMOD];
  code_t res_im [NMOD];
  logic  [NMOD-1:0] conv_v, chan_v, chanh_v, inv_v;
  logic  crt_re_v, crt_im_v;

  for (genvar i = 0; i < NMOD; i++) begin : g_mod
    localparam int unsigned MI = MODULI[i];
    localparam int WI = $clog2(MI);

    logic [WI-1:0] x_code, xh_code, y_res, yh_res, re_r, im_r;

    bin_to_qrns #(.M(MI), .IN_W(IN_W)) u_in (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (in_valid),
      .in_re     (in_re),
      .in_im     (in_im),
      .out_valid (conv_v[i]),
      .x_code    (x_code),
      .xh_code   (xh_code)
    );

    rns_fir_channel #(.M(MI), .TAPS(TAPS)) u_fir_x (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (conv_v[i]),
      .x_code    (x_code),
      .coef_we   (coef_we),
      .coef_tap  (coef_tap),
      .coef_code (coef_code[i][WI-1:0]),
      .out_valid (chan_v[i]),
      .y_res     (y_res)
    );

    rns_fir_channel #(.M(MI), .TAPS(TAPS)) u_fir_xh (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (conv_v[i]),
      .x_code    (xh_code),
      .coef_we   (coef_we),
      .coef_tap  (coef_tap),
      .coef_code (coef_code_hat[i][WI-1:0]),
      .out_valid (chanh_v[i]),
      .y_res     (yh_res)
    );

    qrns_to_rns #(.M(MI)) u_out (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (chan_v[i]),
      .z         (y_res),
      .zh        (yh_res),
      .out_valid (inv_v[i]),
      .re        (re_r),
      .im        (im_r)
    );

    assign res_re[i] = CODE_W'(re_r);
    assign res_im[i] = CODE_W'(im_r);
  end

  crt_converter #(.OUT_W_P(OUT_W)) u_crt_re (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (inv_v[0]),
    .res       (res_re),
    .out_valid (crt_re_v),
    .y         (out_re)
  );

  crt_converter #(.OUT_W_P(OUT_W)) u_crt_im (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (inv_v[0]),
    .res       (res_im),
    .out_valid (crt_im_v),
    .y         (out_im)
  );

  assign out_valid = crt_re_v;

  // All modular lanes run in lock step; their valid flags must agree.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (conv_v == {NMOD{conv_v[0]}} && chan_v == chanh_v &&
              chan_v == {NMOD{chan_v[0]}} && inv_v == {NMOD{inv_v[0]}} &&
              crt_re_v == crt_im_v)
        else $error("qrns_fir: modular lanes out of step");
    end
  end

endmodule
