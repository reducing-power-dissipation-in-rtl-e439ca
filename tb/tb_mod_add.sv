// tb_mod_add: exhaustive self-checking test of the modulo adder.
//
// Three instances (M = 4, 17 and 41, covering a power of two used for index
// addition and two prime moduli) see every pair of residues; each sum is
// compared with (a + b) mod M computed by the testbench. It also counts
// how often each of the two adder paths (sum kept, M subtracted) is the
// expected one. A watchdog ends the run if it hangs.
module tb_mod_add;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_plain = 0, n_wrap = 0;

  logic [1:0] a4, b4, s4;
  logic [4:0] a17, b17, s17;
  logic [5:0] a41, b41, s41;

  mod_add #(.M(4))  u4  (.a(a4),  .b(b4),  .s(s4));
  mod_add #(.M(17)) u17 (.a(a17), .b(b17), .s(s17));
  mod_add #(.M(41)) u41 (.a(a41), .b(b41), .s(s41));

  task automatic check(int got, int a, int b, int m);
    checks++;
    if (a + b >= m) n_wrap++; else n_plain++;
    if (got != (a + b) % m) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d: %0d + %0d gave %0d", m, a, b, got);
    end
  endtask

  initial begin
    for (int a = 0; a < 41; a++)
      for (int b = 0; b < 41; b++) begin
        a4  = 2'(a % 4);   b4  = 2'(b % 4);
        a17 = 5'(a % 17);  b17 = 5'(b % 17);
        a41 = 6'(a);       b41 = 6'(b);
        @(posedge clk);
        if (a < 4  && b < 4)  check(int'(s4),  a, b, 4);
        if (a < 17 && b < 17) check(int'(s17), a, b, 17);
        check(int'(s41), a, b, 41);
      end
    if (n_plain == 0 || n_wrap == 0) failures++;
    $display("paths: plain=%0d wrapped=%0d", n_plain, n_wrap);
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
