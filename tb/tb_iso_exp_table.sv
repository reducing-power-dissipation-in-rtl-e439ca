// tb_iso_exp_table: exhaustive self-checking test of the inverse
// isomorphism table for all five moduli.
//
// Every index w in [0, m-2] must give g**w mod m, with g the smallest
// primitive root found here by brute force; the outputs over all indices
// must be a permutation of [1, m-1]; codes from m-1 upwards must give 0.
// Watchdog included.
module tb_iso_exp_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int groot(int m);
    for (int g = 2; g < m; g++) begin
      int acc = 1, order = 0;
      do begin acc = acc * g % m; order++; end while (acc != 1);
      if (order == m - 1) return g;
    end
    return 0;
  endfunction

  function automatic int powm(int b, int e, int m);
    int r = 1;
    for (int i = 0; i < e; i++) r = r * b % m;
    return r;
  endfunction

  logic [2:0] w5,  n5;
  logic [3:0] w13, n13;
  logic [4:0] w17, n17, w29, n29;
  logic [5:0] w41, n41;

  iso_exp_table #(.M(5))  u5  (.idx(w5),  .res(n5));
  iso_exp_table #(.M(13)) u13 (.idx(w13), .res(n13));
  iso_exp_table #(.M(17)) u17 (.idx(w17), .res(n17));
  iso_exp_table #(.M(29)) u29 (.idx(w29), .res(n29));
  iso_exp_table #(.M(41)) u41 (.idx(w41), .res(n41));

  bit seen [5][64];
  localparam int MODS [5] = '{5, 13, 17, 29, 41};
  localparam int BITS [5] = '{3, 4, 5, 5, 6};

  task automatic check(int j, int w, int n);
    int m = MODS[j];
    bit ok;
    if (w >= 2**BITS[j]) return;
    checks++;
    if (w >= m - 1) ok = (n == 0);
    else begin
      ok = (n == powm(groot(m), w, m));
      seen[j][n] = 1'b1;
    end
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d: w=%0d gave %0d", m, w, n);
    end
  endtask

  initial begin
    for (int w = 0; w < 64; w++) begin
      w5 = 3'(w); w13 = 4'(w); w17 = 5'(w); w29 = 5'(w); w41 = 6'(w);
      @(posedge clk);
      check(0, w, int'(n5));
      check(1, w, int'(n13));
      check(2, w, int'(n17));
      check(3, w, int'(n29));
      check(4, w, int'(n41));
    end
    for (int j = 0; j < 5; j++)
      for (int n = 1; n < MODS[j]; n++) begin
        checks++;
        if (!seen[j][n]) begin failures++; $display("FAIL m=%0d: %0d never produced", MODS[j], n); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
