// tb_mod_reduce: exhaustive self-checking test of the final modulo
// reduction for M = 41 and M = 5 over every 12-bit sum, with one-edge
// latency checked on every value. Watchdog included.
module tb_mod_reduce;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst, in_valid;
  logic [11:0] s;
  logic v41, v5;
  logic [5:0] r41;
  logic [2:0] r5;

  mod_reduce #(.M(41), .WIN(12)) u41 (.clk, .rst, .in_valid, .s, .out_valid(v41), .r(r41));
  mod_reduce #(.M(5),  .WIN(12)) u5  (.clk, .rst, .in_valid, .s, .out_valid(v5),  .r(r5));

  initial begin
    int prev = -1;
    rst = 1'b1; in_valid = 1'b0; s = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i <= 4096; i++) begin
      @(negedge clk);
      if (prev >= 0) begin
        checks++;
        if (!v41 || !v5 || int'(r41) != prev % 41 || int'(r5) != prev % 5) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: got %0d %0d", prev, r41, r5);
        end
      end
      in_valid = (i < 4096);
      s = 12'(i);
      prev = (i < 4096) ? i : -1;
    end
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
