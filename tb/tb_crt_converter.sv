// tb_crt_converter: self-checking test of the CRT output converter.
//
// Random signed values, including both ends of the range +-(M-1)/2 and
// zero, are split into residues modulo {5, 13, 17, 29, 41} by the
// testbench; the converter must return the value exactly three clock edges
// later. Values beyond the range must come back wrapped modulo
// M = 1 313 845 into the signed range. Counts negative results and wraps.
// Watchdog included.
module tb_crt_converter;
  import qrns_pkg::code_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LAT = 3;
  localparam int NS  = 5000;
  localparam int MR  = 5 * 13 * 17 * 29 * 41;
  localparam int HALF = (MR - 1) / 2;
  localparam int MODS [5] = '{5, 13, 17, 29, 41};

  int checks = 0, failures = 0, n_neg = 0, n_wrap = 0;

  logic rst, in_valid, out_valid;
  code_t res [5];
  logic signed [20:0] y;

  crt_converter u_dut (.clk, .rst, .in_valid, .res, .out_valid, .y);

  typedef struct { int due; int v; } item_t;
  item_t q[$];

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    for (int j = 0; j < 5; j++) res[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NS + LAT + 1; i++) begin
      int v, e;
      @(negedge clk);
      checks++;
      if (q.size() > 0 && q[0].due == i) begin
        if (!out_valid || int'(y) != q[0].v) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: got %0d exp %0d", i, y, q[0].v);
        end
        if (q[0].v < 0) n_neg++;
        void'(q.pop_front());
      end else if (out_valid) begin
        failures++;
        $display("FAIL spurious valid at %0d", i);
      end
      in_valid = (i < NS) && ($urandom_range(0, 5) != 0);
      case (i % 100)
        0: v = HALF;
        1: v = -HALF;
        2: v = 0;
        3: v = HALF + 1 + int'($urandom_range(0, 4000000));     // beyond range
        4: v = -HALF - 1 - int'($urandom_range(0, 4000000));
        default: v = int'($urandom_range(0, 2 * HALF)) - HALF;
      endcase
      for (int j = 0; j < 5; j++) res[j] = 6'(((v % MODS[j]) + MODS[j]) % MODS[j]);
      e = ((v % MR) + MR) % MR;
      if (e > HALF) e -= MR;
      if (in_valid && e != v) n_wrap++;
      if (in_valid) q.push_back('{i + LAT, e});
    end
    if (n_neg == 0 || n_wrap == 0) failures++;
    $display("negative results: %0d wrapped: %0d", n_neg, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
