// crt_converter: residue-to-binary converter by the Chinese Remainder
// Theorem, with a signed result.
//
// For residues z_i modulo the five moduli m_i of qrns_pkg, with
// M = prod(m_i) and Mbar_i = M / m_i,
//   Z = < sum_i Mbar_i * <Mbar_i^-1 * z_i>_{m_i} >_M .
// The CRT itself is the source design's output conversion; the pipeline
// below and the signed mapping are this design's choice. Z in [0, M-1] is
// read as a signed value: Z > (M-1)/2 stands for Z - M, so results in
// [-(M-1)/2, (M-1)/2] come out exactly and anything outside that range
// wraps around modulo M.
//
// How: stage 1 forms each weighted term Mbar_i * <Mbar_i^-1 * z_i>_{m_i}
// (each below M). Stage 2 adds the five terms (sum below 5M) and subtracts
// the largest multiple k*M, k in 0..4, not exceeding the sum. Stage 3
// applies the signed mapping.
//
// Interface: res[i] carries z_i in its low $clog2(m_i) bits. y is OUT_W
// bits two's complement. Latency three clock edges, one value per clock;
// rst clears the valid pipeline only.
module crt_converter
  import qrns_pkg::*;
#(
  parameter int OUT_W_P = qrns_pkg::OUT_W
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  code_t                     res [NMOD],
  output logic                      out_valid,
  output logic signed [OUT_W_P-1:0] y
);
  localparam int MR   = dyn_range();
  localparam int ZW   = $clog2(MR);          // width of a value below M
  localparam int SW   = $clog2(NMOD * MR);   // width of the sum of the terms
  localparam int HALF = (MR - 1) / 2;

  // Stage 1: weighted terms.
  logic [ZW-1:0] term_c [NMOD];
  logic [ZW-1:0] term_q [NMOD];

  for (genvar i = 0; i < NMOD; i++) begin : g_term
    localparam int MI   = MODULI[i];
    localparam int WI   = $clog2(MI);
    localparam int MBAR = MR / MI;
    localparam int MINV = inv_mod(MBAR % MI, MI);
    logic [2*WI-1:0] prod;
    logic [WI-1:0]   t;
    assign prod      = (2*WI)'(res[i][WI-1:0]) * (2*WI)'(MINV);
    assign t         = WI'(prod % (2*WI)'(MI));
    assign term_c[i] = ZW'(t) * ZW'(MBAR);
  end

  // Stage 2: sum and reduction modulo M.
  logic [SW-1:0] tot;
  logic [ZW-1:0] z_c, z_q;

  always_comb begin
    tot = '0;
    for (int i = 0; i < NMOD; i++) tot = tot + SW'(term_q[i]);
    z_c = ZW'(tot);
    for (int k = 1; k < NMOD; k++)
      if (tot >= SW'(k * MR)) z_c = ZW'(tot - SW'(k * MR));
  end

  logic [2:0] vpipe;

  always_ff @(posedge clk) begin
    term_q <= term_c;
    z_q    <= z_c;
    if (z_q > ZW'(HALF)) y <= OUT_W_P'($signed({1'b0, z_q}) - $signed((ZW+1)'(MR)));
    else                 y <= OUT_W_P'($signed({1'b0, z_q}));
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[1:0], in_valid};
  end

  assign out_valid = vpipe[2];

endmodule
