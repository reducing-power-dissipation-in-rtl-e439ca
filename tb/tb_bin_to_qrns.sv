// tb_bin_to_qrns: self-checking test of the input converter.
//
// Two instances (M = 13 and M = 41) receive random 10-bit complex samples
// with random gaps in in_valid, plus the extreme values and the worked
// example 3 + j (X = 8, Xhat = 11 modulo 13). The testbench computes
// X = <x_R + q*x_I>_M and Xhat = <x_R - q*x_I>_M itself (q the smallest
// root of q*q = -1, found by brute force) and encodes them as indices of
// the smallest primitive root, zero as the pattern M-1. Every output must
// appear exactly two clock edges after its input. Counts samples whose
// residue was zero (zero pattern). Watchdog included.
module tb_bin_to_qrns;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LAT = 2;
  localparam int NS  = 3000;

  int checks = 0, failures = 0, n_zero = 0, n_bubble = 0;

  logic rst, in_valid;
  logic signed [9:0] in_re, in_im;
  logic v13, v41;
  logic [3:0] x13, xh13;
  logic [5:0] x41, xh41;

  bin_to_qrns #(.M(13)) u13 (.clk, .rst, .in_valid, .in_re, .in_im,
                             .out_valid(v13), .x_code(x13), .xh_code(xh13));
  bin_to_qrns #(.M(41)) u41 (.clk, .rst, .in_valid, .in_re, .in_im,
                             .out_valid(v41), .x_code(x41), .xh_code(xh41));

  function automatic int md(int a, int m);
    return ((a % m) + m) % m;
  endfunction

  function automatic int qroot(int m);
    for (int q = 1; q < m; q++) if (q * q % m == m - 1) return q;
    return 0;
  endfunction

  function automatic int groot(int m);
    for (int g = 2; g < m; g++) begin
      int acc = 1, order = 0;
      do begin acc = acc * g % m; order++; end while (acc != 1);
      if (order == m - 1) return g;
    end
    return 0;
  endfunction

  function automatic int code_of(int n, int m);
    int g = groot(m), acc = 1;
    if (n == 0) return m - 1;
    for (int w = 0; w < m - 1; w++) begin
      if (acc == n) return w;
      acc = acc * g % m;
    end
    return -1;
  endfunction

  typedef struct { int due; int re; int im; } item_t;
  item_t q[$];

  task automatic expect_codes(int re, int im);
    int c[4];
    c[0] = code_of(md(re + qroot(13) * im, 13), 13);
    c[1] = code_of(md(re - qroot(13) * im, 13), 13);
    c[2] = code_of(md(re + qroot(41) * im, 41), 41);
    c[3] = code_of(md(re - qroot(41) * im, 41), 41);
    if (c[0] == 12 || c[1] == 12 || c[2] == 40 || c[3] == 40) n_zero++;
    checks++;
    if (!v13 || !v41 || int'(x13) != c[0] || int'(xh13) != c[1] ||
        int'(x41) != c[2] || int'(xh41) != c[3]) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=(%0d,%0d): got %0d %0d %0d %0d exp %0d %0d %0d %0d (v %b%b)",
                 re, im, x13, xh13, x41, xh41, c[0], c[1], c[2], c[3], v13, v41);
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NS + LAT + 1; i++) begin
      @(negedge clk);
      // Check what was issued LAT iterations ago.
      if (q.size() > 0 && q[0].due == i) begin
        expect_codes(q[0].re, q[0].im);
        void'(q.pop_front());
      end else begin
        checks++;
        if (v13 || v41) begin failures++; $display("FAIL spurious valid at %0d", i); end
      end
      // Issue a new sample.
      in_valid = (i < NS) && ($urandom_range(0, 3) != 0);
      if (i < NS && !in_valid) n_bubble++;
      case (i)
        0: begin in_re = 10'sd3;    in_im = 10'sd1;    in_valid = 1'b1; end
        1: begin in_re = -10'sd512; in_im = -10'sd512; in_valid = 1'b1; end
        2: begin in_re = 10'sd511;  in_im = 10'sd511;  in_valid = 1'b1; end
        3: begin in_re = 10'sd0;    in_im = 10'sd0;    in_valid = 1'b1; end
        default: begin in_re = 10'($urandom); in_im = 10'($urandom); end
      endcase
      if (in_valid) q.push_back('{i + LAT, int'(in_re), int'(in_im)});
      if (i == LAT) begin
        // The worked example: 3 + j -> X = 8 (2**3), Xhat = 11 (2**7) mod 13.
        checks++;
        if (x13 != 4'd3 || xh13 != 4'd7) begin failures++; $display("FAIL worked example"); end
      end
    end
    if (n_zero == 0 || n_bubble == 0) failures++;
    $display("zero residues: %0d bubbles: %0d", n_zero, n_bubble);
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
