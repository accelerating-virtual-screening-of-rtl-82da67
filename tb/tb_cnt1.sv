// Self-checking test of cnt1: random 128-bit words, one per cycle, including
// all-zero and all-one words; each count must equal $countones of the word
// presented exactly 6 cycles earlier (the pipeline depth for N=128, K=7).
// A second instance with N=20, K=7 checks a short tree (3 groups, 3 stages).
module tb_cnt1;
  localparam int LAT = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] din;
  logic [7:0]   cnt;
  logic [19:0]  din2;
  logic [4:0]   cnt2;
  logic [127:0] hist  [$];
  logic [19:0]  hist2 [$];

  cnt1 #(.N(128), .K(7)) dut  (.clk(clk), .din(din),  .cnt(cnt));
  cnt1 #(.N(20),  .K(7)) dut2 (.clk(clk), .din(din2), .cnt(cnt2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t % 97 == 5)       din = '0;
      else if (t % 97 == 6)  din = '1;
      else                   din = {$urandom, $urandom, $urandom, $urandom} & {4{$urandom}};
      din2 = 20'($urandom);
      hist.push_back(din);
      hist2.push_back(din2);
      if (hist.size() > LAT) begin
        logic [127:0] w;
        w  = hist.pop_front();
        checks++;
        if (cnt !== 8'($countones(w))) begin
          failures++;
          if (failures < 10) $display("cnt1 mismatch t=%0d got %0d exp %0d", t, cnt, $countones(w));
        end
      end
      if (hist2.size() > 3) begin
        logic [19:0] w2;
        w2 = hist2.pop_front();
        checks++;
        if (cnt2 !== 5'($countones(w2))) begin
          failures++;
          if (failures < 10) $display("cnt1 N=20 mismatch got %0d exp %0d", cnt2, $countones(w2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
