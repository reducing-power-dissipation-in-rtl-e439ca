// tb_iso_mult: exhaustive self-checking test of the isomorphic multiplier.
//
// For M = 5, 17 and 41 every pair of residues (zero included) is encoded
// in index form by the testbench's own discrete logarithm (smallest
// primitive root, found by brute force here) and the product from the
// multiplier is compared with (a * b) mod M. Products with a zero operand
// exercise the adder bypass and are counted separately. Watchdog included.
module tb_iso_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_zero = 0;

  function automatic int root_of(int m);
    for (int g = 2; g < m; g++) begin
      int acc = 1, order = 0;
      do begin acc = acc * g % m; order++; end while (acc != 1);
      if (order == m - 1) return g;
    end
    return 0;
  endfunction

  // Index code of residue n: w with g**w = n, or m-1 for zero.
  function automatic int code_of(int n, int m);
    int g = root_of(m), acc = 1;
    if (n == 0) return m - 1;
    for (int w = 0; w < m - 1; w++) begin
      if (acc == n) return w;
      acc = acc * g % m;
    end
    return -1;
  endfunction

  logic [2:0] x5,  c5,  p5;
  logic [4:0] x17, c17, p17;
  logic [5:0] x41, c41, p41;

  iso_mult #(.M(5))  u5  (.x_code(x5),  .c_code(c5),  .p(p5));
  iso_mult #(.M(17)) u17 (.x_code(x17), .c_code(c17), .p(p17));
  iso_mult #(.M(41)) u41 (.x_code(x41), .c_code(c41), .p(p41));

  task automatic check(int got, int a, int b, int m);
    checks++;
    if (a == 0 || b == 0) n_zero++;
    if (got != a * b % m) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d: %0d * %0d gave %0d", m, a, b, got);
    end
  endtask

  initial begin
    for (int a = 0; a < 41; a++)
      for (int b = 0; b < 41; b++) begin
        x5  = 3'(code_of(a % 5, 5));    c5  = 3'(code_of(b % 5, 5));
        x17 = 5'(code_of(a % 17, 17));  c17 = 5'(code_of(b % 17, 17));
        x41 = 6'(code_of(a, 41));       c41 = 6'(code_of(b, 41));
        @(posedge clk);
        if (a < 5  && b < 5)  check(int'(p5),  a, b, 5);
        if (a < 17 && b < 17) check(int'(p17), a, b, 17);
        check(int'(p41), a, b, 41);
      end
    // Worked example of the isomorphic multiplication: <3 * 4>_5 = 2.
    x5 = 3'(code_of(3, 5)); c5 = 3'(code_of(4, 5));
    @(posedge clk);
    checks++;
    if (x5 != 3'd3 || c5 != 3'd2 || p5 != 3'd2) failures++;
    if (n_zero == 0) failures++;
    $display("zero-operand bypasses: %0d", n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
