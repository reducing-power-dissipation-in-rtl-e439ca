// tb_rns_fir_channel: self-checking test of one modular FIR filter.
//
// Instance 0 is M = 17 with 16 taps (latency 4), instance 1 is M = 41 with
// the full 64 taps (latency 5). The testbench loads random coefficients
// (about one in eight zero) in index form, streams random residues (zero
// included) with random gaps in in_valid, reloads a new coefficient set
// halfway through, and compares every output with
// y(n) = < sum_k a_k x(n-k) >_M computed from its own history of the
// samples, at the exact output cycle. Index codes come from the
// testbench's own discrete logarithm (smallest primitive root, found by
// brute force). Counts zero operands, bubbles and reloads. Watchdog included.
module tb_rns_fir_channel;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int MM [2] = '{17, 41};
  localparam int TT [2] = '{16, 64};
  localparam int LL [2] = '{4, 5};
  localparam int NS = 1500;

  int checks = 0, failures = 0, n_zero_x = 0, n_zero_c = 0, n_bubble = 0, n_reload = 0;

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

  logic rst, in_valid, coef_we;
  logic [5:0] coef_tap;
  logic [4:0] x0, c0, y0;
  logic [5:0] x1, c1, y1;
  logic v0, v1;

  logic we0;
  assign we0 = coef_we && (coef_tap < 6'd16);  // instance 0 has 16 taps only

  rns_fir_channel #(.M(17), .TAPS(16)) u0 (.clk, .rst, .in_valid, .x_code(x0),
      .coef_we(we0), .coef_tap(coef_tap[3:0]), .coef_code(c0), .out_valid(v0), .y_res(y0));
  rns_fir_channel #(.M(41), .TAPS(64)) u1 (.clk, .rst, .in_valid, .x_code(x1),
      .coef_we, .coef_tap(coef_tap), .coef_code(c1), .out_valid(v1), .y_res(y1));

  int coef [2][64];
  int hist [2][$];
  typedef struct { int due; int e; } item_t;
  item_t q [2][$];

  task automatic load_coefs();
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      coef_we  = 1'b1;
      coef_tap = 6'(k);
      for (int j = 0; j < 2; j++) begin
        coef[j][k] = ($urandom_range(0, 7) == 0) ? 0 : int'($urandom_range(0, MM[j] - 1));
        if (coef[j][k] == 0) n_zero_c++;
      end
      c0 = 5'(code_of(coef[0][k], 17));
      c1 = 6'(code_of(coef[1][k], 41));
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  function automatic int ref_out(int j);
    int s = 0, n = hist[j].size();
    for (int k = 0; k < TT[j] && k < n; k++) s += coef[j][k] * hist[j][n - 1 - k];
    return s % MM[j];
  endfunction

  task automatic run(int ns);
    for (int i = 0; i < ns + 8; i++) begin
      int xr [2];
      @(negedge clk);
      for (int j = 0; j < 2; j++) begin
        logic v;
        int   y;
        v = (j == 0) ? v0 : v1;
        y = (j == 0) ? int'(y0) : int'(y1);
        checks++;
        if (q[j].size() > 0 && q[j][0].due == i) begin
          if (!v || y != q[j][0].e) begin
            failures++;
            if (failures < 10) $display("FAIL ch%0d at %0d: got %0d exp %0d (v %b)", j, i, y, q[j][0].e, v);
          end
          void'(q[j].pop_front());
        end else if (v) begin
          failures++;
          $display("FAIL ch%0d spurious valid at %0d", j, i);
        end
      end
      in_valid = (i < ns) && ($urandom_range(0, 3) != 0);
      if (i < ns && !in_valid) n_bubble++;
      for (int j = 0; j < 2; j++)
        xr[j] = ($urandom_range(0, 9) == 0) ? 0 : int'($urandom_range(0, MM[j] - 1));
      x0 = 5'(code_of(xr[0], 17));
      x1 = 6'(code_of(xr[1], 41));
      if (in_valid) begin
        if (xr[0] == 0 || xr[1] == 0) n_zero_x++;
        for (int j = 0; j < 2; j++) begin
          hist[j].push_back(xr[j]);
          q[j].push_back('{i + LL[j], ref_out(j)});
        end
      end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; coef_we = 1'b0; coef_tap = '0;
    x0 = '0; x1 = '0; c0 = '0; c1 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    load_coefs();
    run(NS);
    load_coefs();
    n_reload++;
    run(NS);
    if (n_zero_x == 0 || n_zero_c == 0 || n_bubble == 0 || n_reload == 0) failures++;
    $display("zero samples: %0d zero coefs: %0d bubbles: %0d reloads: %0d",
             n_zero_x, n_zero_c, n_bubble, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NS + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
