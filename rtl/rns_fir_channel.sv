// rns_fir_channel: direct-form FIR filter modulo one prime M, one of the
// ten parallel modular filters of the QRNS filter (five moduli, each for
// the X and the Xhat component).
//
// Samples arrive as index codes (from bin_to_qrns): index w of a nonzero
// residue, or the zero pattern M-1. Following the source design, the
// delayed samples stay in index form and the coefficients are loaded once,
// already in index form, so each tap product <a_k * x(n-k)>_M is one
// iso_mult (an index addition modulo M-1 and a table look-up, bypassed for
// a zero operand). The TAPS products are added in binary by sum_tree and
// the total is reduced modulo M by mod_reduce.
//
//   y(n) = < sum_{k=0}^{TAPS-1} a_k * x(n-k) >_M
//
// Tap 0 takes x(n) straight from the input; TAPS-1 registers hold
// x(n-1) .. x(n-TAPS+1). The delay line advances only on in_valid, so gaps
// in the input stream are allowed and do not count as samples.
//
// Coefficient load: coef_we writes coef_code (index form) into tap
// coef_tap at the clock edge. Reset sets all coefficients and the delay
// line to the zero pattern. Loading is meant to happen while the filter
// is idle; a write takes effect for products formed from the next edge on.
//
// Timing: product register (1) + adder tree (ceil($clog2(TAPS)/2)) +
// reduction (1). For TAPS = 64 the output follows in_valid by 5 edges.
// rst is synchronous, active high.
module rns_fir_channel #(
  parameter int unsigned M    = 13,
  parameter int          TAPS = 64
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [$clog2(M)-1:0]    x_code,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_tap,
  input  logic [$clog2(M)-1:0]    coef_code,
  output logic                    out_valid,
  output logic [$clog2(M)-1:0]    y_res
);
  localparam int W    = $clog2(M);
  localparam int SUMW = W + $clog2(TAPS);
  localparam logic [W-1:0] ZERO_CODE = W'(M - 1);

  // Coefficients in index form.
  logic [W-1:0] coef [TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= ZERO_CODE;
    end else if (coef_we) begin
      coef[coef_tap] <= coef_code;
    end
  end

  // Delay line: dl[k] holds x(n-k) for k >= 1.
  logic [W-1:0] dl  [1:TAPS-1];
  logic [W-1:0] tap [TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k < TAPS; k++) dl[k] <= ZERO_CODE;
    end else if (in_valid) begin
      dl[1] <= x_code;
      for (int k = 2; k < TAPS; k++) dl[k] <= dl[k-1];
    end
  end

  always_comb begin
    tap[0] = x_code;
    for (int k = 1; k < TAPS; k++) tap[k] = dl[k];
  end

  // One isomorphic multiplier per tap, then the product register.
  logic [W-1:0] prod   [TAPS];
  logic [W-1:0] prod_q [TAPS];
  logic         prod_v;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    iso_mult #(.M(M)) u_mul (
      .x_code (tap[k]),
      .c_code (coef[k]),
      .p      (prod[k])
    );
  end

  always_ff @(posedge clk) begin
    prod_q <= prod;
    if (rst) prod_v <= 1'b0;
    else     prod_v <= in_valid;
  end

  // Adder tree and final reduction modulo M.
  logic            sum_v;
  logic [SUMW-1:0] sum;

  sum_tree #(.N(TAPS), .WIN(W), .LPS(2)) u_tree (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (prod_v),
    .in_data   (prod_q),
    .out_valid (sum_v),
    .sum       (sum)
  );

  mod_reduce #(.M(M), .WIN(SUMW)) u_red (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (sum_v),
    .s         (sum),
    .out_valid (out_valid),
    .r         (y_res)
  );

endmodule
