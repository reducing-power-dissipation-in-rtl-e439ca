// tb_qrns_fir: end-to-end self-checking test of the QRNS complex FIR
// filter at its default size (64 taps, 10-bit complex data, moduli
// {5, 13, 17, 29, 41}).
//
// The testbench keeps its own model in ordinary integer arithmetic:
// y(n) = sum_{k<64} a_k x(n-k) over complex numbers, reduced to the
// filter's signed range [-(M-1)/2, (M-1)/2], M = 1 313 845, by wrapping
// modulo M. Coefficients are converted to the filter's index form by the
// testbench itself (q the smallest root of q*q = -1, r the smallest
// primitive root of each modulus, both found by brute force here).
//
// Phase 1: full-scale random coefficients and samples (many results out
// of range, so wrap-around is exercised). Phase 2: coefficients reloaded
// with small values so most results are exact. Phase 3: an impulse, whose
// response must be the coefficient list itself. Phase 4: the single
// product (3 + j)(2 + 2j), which must give 4 + 8j. Throughout, in_valid has
// random gaps and some samples and coefficients are zero or have zero
// residues. Every output is checked at exactly LAT = 11 clock edges after
// its sample. The run fails if any mechanism (bubble, zero-operand bypass,
// coefficient reload, wrap-around, negative and exact results) never
// occurred. Watchdog included.
module tb_qrns_fir;
  import qrns_pkg::code_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int TAPS = 64;
  localparam int LAT  = 11;
  localparam int NS   = 800;
  localparam int MODS [5] = '{5, 13, 17, 29, 41};
  localparam longint MR   = 5 * 13 * 17 * 29 * 41;
  localparam longint HALF = (MR - 1) / 2;

  int checks = 0, failures = 0;
  int n_bubble = 0, n_zero_res = 0, n_zero_coef = 0, n_reload = 0;
  int n_wrap = 0, n_exact = 0, n_neg = 0;

  logic rst, in_valid, coef_we, out_valid;
  logic signed [9:0] in_re, in_im;
  logic [5:0] coef_tap;
  code_t coef_code [5], coef_code_hat [5];
  logic signed [20:0] out_re, out_im;

  qrns_fir u_dut (.clk, .rst, .in_valid, .in_re, .in_im, .coef_we, .coef_tap,
                  .coef_code, .coef_code_hat, .out_valid, .out_re, .out_im);

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

  function automatic longint wrap(longint v);
    longint e = ((v % MR) + MR) % MR;
    if (e > HALF) e -= MR;
    return e;
  endfunction

  int a_re [TAPS], a_im [TAPS];
  int h_re [$], h_im [$];
  typedef struct { int due; longint er; longint ei; } item_t;
  item_t q[$];

  task automatic load_coefs(int amp, int kind);
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      if (kind == 1) begin
        a_re[k] = k - 32; a_im[k] = 7 - k;
      end else if (kind == 2) begin
        a_re[k] = (k == 0) ? 2 : 0; a_im[k] = (k == 0) ? 2 : 0;
      end else if ($urandom_range(0, 9) == 0) begin
        a_re[k] = 0; a_im[k] = 0;
      end else begin
        a_re[k] = int'($urandom_range(0, 2 * amp)) - amp;
        a_im[k] = int'($urandom_range(0, 2 * amp)) - amp;
      end
      coef_we  = 1'b1;
      coef_tap = 6'(k);
      for (int j = 0; j < 5; j++) begin
        int m = MODS[j], qq = qroot(MODS[j]);
        int ar = md(a_re[k] + qq * a_im[k], m);
        int ah = md(a_re[k] - qq * a_im[k], m);
        if (ar == 0 || ah == 0) n_zero_coef++;
        coef_code[j]     = 6'(code_of(ar, m));
        coef_code_hat[j] = 6'(code_of(ah, m));
      end
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  function automatic void push_ref(int due);
    longint sr = 0, si = 0;
    int n = h_re.size();
    for (int k = 0; k < TAPS && k < n; k++) begin
      sr += longint'(a_re[k]) * h_re[n-1-k] - longint'(a_im[k]) * h_im[n-1-k];
      si += longint'(a_re[k]) * h_im[n-1-k] + longint'(a_im[k]) * h_re[n-1-k];
    end
    if (wrap(sr) != sr || wrap(si) != si) n_wrap++; else n_exact++;
    q.push_back('{due, wrap(sr), wrap(si)});
  endfunction

  // mode 0: random full scale, 1: random small, 2: impulse then zeros,
  // 3: the sample 3 + j then zeros
  task automatic run(int ns, int mode);
    for (int i = 0; i < ns + LAT + 2; i++) begin
      @(negedge clk);
      checks++;
      if (q.size() > 0 && q[0].due == i) begin
        if (!out_valid || longint'(out_re) != q[0].er || longint'(out_im) != q[0].ei) begin
          failures++;
          if (failures < 10)
            $display("FAIL at %0d: got (%0d,%0d) exp (%0d,%0d) valid %b",
                     i, out_re, out_im, q[0].er, q[0].ei, out_valid);
        end
        if (out_re < 0 || out_im < 0) n_neg++;
        void'(q.pop_front());
      end else if (out_valid) begin
        failures++;
        $display("FAIL spurious valid at %0d", i);
      end
      in_valid = (i < ns) && (mode >= 2 || $urandom_range(0, 3) != 0);
      if (i < ns && !in_valid) n_bubble++;
      case (mode)
        0: begin in_re = 10'($urandom); in_im = 10'($urandom); end
        1: begin
          in_re = 10'(int'($urandom_range(0, 400)) - 200);
          in_im = 10'(int'($urandom_range(0, 400)) - 200);
        end
        2: begin
          in_re = (i == 0) ? 10'sd1 : 10'sd0;
          in_im = '0;
        end
        default: begin
          in_re = (i == 0) ? 10'sd3 : 10'sd0;
          in_im = (i == 0) ? 10'sd1 : 10'sd0;
        end
      endcase
      if (i == LAT && mode == 3) begin
        // Worked example: (3 + j)(2 + 2j) = 4 + 8j.
        checks++;
        if (!out_valid || out_re != 21'sd4 || out_im != 21'sd8) begin
          failures++;
          $display("FAIL worked example: got (%0d,%0d)", out_re, out_im);
        end
      end
      if (i % 37 == 5) begin in_re = 10'sd0; in_im = 10'sd0; end
      if (in_valid) begin
        for (int j = 0; j < 5; j++) begin
          int qq = qroot(MODS[j]);
          if (md(int'(in_re) + qq * int'(in_im), MODS[j]) == 0 ||
              md(int'(in_re) - qq * int'(in_im), MODS[j]) == 0) begin
            n_zero_res++;
            break;
          end
        end
        h_re.push_back(int'(in_re));
        h_im.push_back(int'(in_im));
        push_ref(i + LAT);
      end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; coef_we = 1'b0; coef_tap = '0;
    in_re = '0; in_im = '0;
    for (int j = 0; j < 5; j++) begin coef_code[j] = '0; coef_code_hat[j] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    load_coefs(511, 0);
    run(NS, 0);
    load_coefs(12, 0);
    n_reload++;
    run(NS, 1);
    load_coefs(0, 1);
    n_reload++;
    run(TAPS + 4, 2);
    load_coefs(0, 2);
    n_reload++;
    run(TAPS + 4, 3);
    if (n_bubble == 0)    begin failures++; $display("no bubble seen"); end
    if (n_zero_res == 0)  begin failures++; $display("no zero sample residue seen"); end
    if (n_zero_coef == 0) begin failures++; $display("no zero coefficient residue seen"); end
    if (n_reload == 0)    begin failures++; $display("no reload"); end
    if (n_wrap == 0)      begin failures++; $display("no wrap-around seen"); end
    if (n_exact == 0)     begin failures++; $display("no exact result seen"); end
    if (n_neg == 0)       begin failures++; $display("no negative result seen"); end
    $display("bubbles=%0d zero-residue samples=%0d zero-residue coefs=%0d reloads=%0d",
             n_bubble, n_zero_res, n_zero_coef, n_reload);
    $display("wrapped=%0d exact=%0d negative=%0d", n_wrap, n_exact, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NS + 6 * TAPS + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
