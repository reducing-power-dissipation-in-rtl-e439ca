// mod_reduce: registered reduction of a non-negative binary sum S to <S>_M.
//
// Used at the output of each modular filter's adder tree. The source design
// refers to a published modulo-reduction technique without describing it;
// this design simply synthesizes the remainder by the constant M, which the
// synthesis tool turns into fixed logic.
//
// Interface: s (WIN bits), in_valid; r ($clog2(M) bits) and out_valid one
// clock edge later. rst (synchronous) clears out_valid only.
module mod_reduce #(
  parameter int unsigned M   = 13,
  parameter int          WIN = 12
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [WIN-1:0]       s,
  output logic                 out_valid,
  output logic [$clog2(M)-1:0] r
);
  localparam int W = $clog2(M);

  always_ff @(posedge clk) begin
    r <= W'(s % WIN'(M));
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

endmodule
