// tb_sum_tree: self-checking test of the pipelined adder tree.
//
// Instance A is the filter's size (N = 64, 6-bit operands, a register every
// two levels: 3 stages). Instance B (N = 5, register after every level: 3
// stages) checks zero padding of a tree that is not a power of two. Both
// get random operand sets, all-maximum sets and gaps in in_valid; each sum
// is compared with the testbench's own total and must come out exactly
// 3 clock edges later. Watchdog included.
module tb_sum_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LAT = 3;
  localparam int NS  = 2000;

  int checks = 0, failures = 0;

  logic rst, in_valid;
  logic [5:0] da [64];
  logic [5:0] db [5];
  logic va, vb;
  logic [11:0] sa;
  logic [8:0]  sb;

  sum_tree #(.N(64), .WIN(6), .LPS(2)) ua (.clk, .rst, .in_valid, .in_data(da),
                                           .out_valid(va), .sum(sa));
  sum_tree #(.N(5), .WIN(6), .LPS(1))  ub (.clk, .rst, .in_valid, .in_data(db),
                                           .out_valid(vb), .sum(sb));

  typedef struct { int due; int ea; int eb; } item_t;
  item_t q[$];

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NS + LAT + 1; i++) begin
      int ta, tb;
      ta = 0; tb = 0;
      @(negedge clk);
      checks++;
      if (q.size() > 0 && q[0].due == i) begin
        if (!va || !vb || int'(sa) != q[0].ea || int'(sb) != q[0].eb) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: got %0d %0d exp %0d %0d", i, sa, sb, q[0].ea, q[0].eb);
        end
        void'(q.pop_front());
      end else if (va || vb) begin
        failures++;
        $display("FAIL spurious valid at %0d", i);
      end
      in_valid = (i < NS) && ($urandom_range(0, 4) != 0);
      for (int k = 0; k < 64; k++) begin
        da[k] = (i % 50 == 7) ? 6'd63 : 6'($urandom);
        ta += int'(da[k]);
      end
      for (int k = 0; k < 5; k++) begin
        db[k] = (i % 50 == 7) ? 6'd63 : 6'($urandom);
        tb += int'(db[k]);
      end
      if (in_valid) q.push_back('{i + LAT, ta, tb});
    end
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
