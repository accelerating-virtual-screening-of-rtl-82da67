// Self-checking test of srl_reg: shift in fingerprints of DEPTH words and
// read every tap; word k must sit at position DEPTH-1-k, the output must
// follow addr without a clock, and nothing may move while shift is low.
// Run at DEPTH 8 (binary) and 14 (pharmacophore).
module tb_srl_reg;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         sh8, sh14;
  logic [127:0] din;
  logic [2:0]   a8;
  logic [3:0]   a14;
  logic [127:0] q8, q14;
  logic [127:0] ref_w [14];

  srl_reg #(.WIDTH(128), .DEPTH(8))  d8  (.clk(clk), .shift(sh8),  .din(din), .addr(a8),  .dout(q8));
  srl_reg #(.WIDTH(128), .DEPTH(14)) d14 (.clk(clk), .shift(sh14), .din(din), .addr(a14), .dout(q14));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int depth);
    for (int k = 0; k < depth; k++) begin
      @(negedge clk);
      ref_w[k] = {$urandom, $urandom, $urandom, $urandom};
      din  = ref_w[k];
      sh8  = (depth == 8);
      sh14 = (depth == 14);
    end
    @(negedge clk);
    sh8  = 0;
    sh14 = 0;
    din  = '1;
  endtask

  initial begin
    sh8 = 0; sh14 = 0; din = '0; a8 = 0; a14 = 0;
    for (int rep = 0; rep < 20; rep++) begin
      load(8);
      load(14);
      repeat (3) @(negedge clk);          // no shift: contents must hold
      for (int k = 0; k < 14; k++) begin
        a14 = 4'(13 - k);
        #1;
        checks++;
        if (q14 !== ref_w[k]) begin
          failures++;
          if (failures < 10) $display("d14 word %0d wrong", k);
        end
      end
    end
    // Binary depth on its own
    for (int rep = 0; rep < 20; rep++) begin
      load(8);
      for (int k = 0; k < 8; k++) begin
        a8 = 3'(7 - k);
        #1;
        checks++;
        if (q8 !== ref_w[k]) begin
          failures++;
          if (failures < 10) $display("d8 word %0d wrong", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
