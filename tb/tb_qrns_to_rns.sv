// tb_qrns_to_rns: exhaustive self-checking test of the inverse QRNS map.
//
// For M = 13 and M = 41 every (re, im) residue pair is mapped forward by
// the testbench, X = <re + q*im>, Xhat = <re - q*im> (q the smallest root
// of q*q = -1), fed to the converter, and the converter must return the
// original (re, im) one clock edge later. Includes the worked example
// (5, 3) -> 4 + 8j modulo 13. Watchdog included.
module tb_qrns_to_rns;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int qroot(int m);
    for (int q = 1; q < m; q++) if (q * q % m == m - 1) return q;
    return 0;
  endfunction

  logic rst, in_valid;
  logic [3:0] z13, zh13, re13, im13;
  logic [5:0] z41, zh41, re41, im41;
  logic v13, v41;

  qrns_to_rns #(.M(13)) u13 (.clk, .rst, .in_valid, .z(z13), .zh(zh13),
                             .out_valid(v13), .re(re13), .im(im13));
  qrns_to_rns #(.M(41)) u41 (.clk, .rst, .in_valid, .z(z41), .zh(zh41),
                             .out_valid(v41), .re(re41), .im(im41));

  initial begin
    int pre = -1, pim = -1;
    int q13 = qroot(13), q41 = qroot(41);
    rst = 1'b1; in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i <= 41 * 41; i++) begin
      @(negedge clk);
      if (pre >= 0) begin
        checks++;
        if (!v13 || !v41 || int'(re41) != pre || int'(im41) != pim ||
            int'(re13) != pre % 13 || int'(im13) != pim % 13) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): got %0d %0d / %0d %0d", pre, pim, re41, im41, re13, im13);
        end
      end
      if (i < 41 * 41) begin
        pre = i / 41; pim = i % 41;
        z41  = 6'((pre + q41 * pim) % 41);
        zh41 = 6'((pre + 41 * 41 - q41 * pim) % 41);
        z13  = 4'((pre % 13 + q13 * (pim % 13)) % 13);
        zh13 = 4'((pre % 13 + 13 * 13 - q13 * (pim % 13)) % 13);
        in_valid = 1'b1;
      end else begin
        pre = -1; in_valid = 1'b0;
      end
    end
    // Worked example: (Z, Zhat) = (5, 3) modulo 13 is 4 + 8j.
    @(negedge clk);
    z13 = 4'd5; zh13 = 4'd3; in_valid = 1'b1;
    @(negedge clk);
    checks++;
    if (re13 != 4'd4 || im13 != 4'd8) begin failures++; $display("FAIL worked example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
