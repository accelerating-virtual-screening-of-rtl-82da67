// Self-checking test of adder_tree: 16 random 8-bit operands per cycle
// (plus all-255 operands to reach the 4080 maximum); the sum must appear
// exactly clog2(16) = 4 cycles later. A second instance with 5 operands
// checks the pass-through of odd operands (3 levels).
module tb_adder_tree;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0][7:0] din;
  logic [11:0]      sum;
  logic [4:0][9:0]  din5;
  logic [12:0]      sum5;
  int exp_q [$];
  int exp5_q [$];

  adder_tree #(.N(16), .IN_W(8))  dut  (.clk(clk), .din(din),  .sum(sum));
  adder_tree #(.N(5),  .IN_W(10)) dut5 (.clk(clk), .din(din5), .sum(sum5));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1500; t++) begin
      int s, s5;
      @(negedge clk);
      s = 0;
      s5 = 0;
      for (int i = 0; i < 16; i++) begin
        din[i] = (t % 50 == 7) ? 8'hff : 8'($urandom);
        s += din[i];
      end
      for (int i = 0; i < 5; i++) begin
        din5[i] = 10'($urandom);
        s5 += din5[i];
      end
      exp_q.push_back(s);
      exp5_q.push_back(s5);
      if (exp_q.size() > 4) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(sum) != e) begin
          failures++;
          if (failures < 10) $display("sum mismatch got %0d exp %0d", sum, e);
        end
      end
      if (exp5_q.size() > 3) begin
        int e;
        e = exp5_q.pop_front();
        checks++;
        if (int'(sum5) != e) begin
          failures++;
          if (failures < 10) $display("sum5 mismatch got %0d exp %0d", sum5, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
