// tb_iso_log_table: exhaustive self-checking test of the forward
// isomorphism table for all five moduli.
//
// Every code of each table's input is applied. For a residue n in
// [1, m-1] the output w must satisfy g**w = n (mod m), with g the smallest
// primitive root found here by brute force, and w must lie in [0, m-2];
// zero and codes above m-1 must give the zero pattern m-1. Watchdog
// included.
module tb_iso_log_table;
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

  logic [2:0] n5,  w5;
  logic [3:0] n13, w13;
  logic [4:0] n17, w17, n29, w29;
  logic [5:0] n41, w41;

  iso_log_table #(.M(5))  u5  (.res(n5),  .code(w5));
  iso_log_table #(.M(13)) u13 (.res(n13), .code(w13));
  iso_log_table #(.M(17)) u17 (.res(n17), .code(w17));
  iso_log_table #(.M(29)) u29 (.res(n29), .code(w29));
  iso_log_table #(.M(41)) u41 (.res(n41), .code(w41));

  task automatic check(int n, int w, int m, int bits);
    bit ok;
    if (n >= 2**bits) return;
    checks++;
    if (n == 0 || n >= m) ok = (w == m - 1);
    else                  ok = (w <= m - 2) && (powm(groot(m), w, m) == n);
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d: n=%0d gave %0d", m, n, w);
    end
  endtask

  initial begin
    for (int n = 0; n < 64; n++) begin
      n5 = 3'(n); n13 = 4'(n); n17 = 5'(n); n29 = 5'(n); n41 = 6'(n);
      @(posedge clk);
      check(n, int'(w5),  5,  3);
      check(n, int'(w13), 13, 4);
      check(n, int'(w17), 17, 5);
      check(n, int'(w29), 29, 5);
      check(n, int'(w41), 41, 6);
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
