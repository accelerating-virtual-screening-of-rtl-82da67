// Self-checking test of sync_fifo against a queue model: random pushes and
// pops (biased phases fill it completely and drain it), checking dout,
// empty, full and count every cycle. Also checks the two-cycle write-to-
// output latency of an empty FIFO. Run at DEPTH 16 to reach full quickly.
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, wr_en, rd_en, empty, full;
  logic [63:0] din, dout;
  logic [4:0]  count;
  logic [63:0] model [$];
  int          n_full = 0;

  sync_fifo #(.WIDTH(64), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("%t sync_fifo: %s", $time, what);
    end
  endtask

  initial begin
    rst_n = 1;
    #1 rst_n = 0; wr_en = 0; rd_en = 0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: write once, visible two edges later
    @(negedge clk); wr_en = 1; din = 64'h1234;
    @(negedge clk); wr_en = 0; chk(empty, "not empty one cycle after write");
    @(negedge clk); chk(!empty && dout == 64'h1234, "word not at output two cycles after write");
    rd_en = 1; @(negedge clk); rd_en = 0; chk(empty && count == 0, "not empty after pop");
    for (int t = 0; t < 6000; t++) begin
      int wp;
      wp = ((t / 300) % 2 == 0) ? 80 : 20;
      @(negedge clk);
      // check current state
      chk(int'(count) == model.size(), "count mismatch");
      chk(full == (model.size() == D), "full mismatch");
      if (full) n_full++;
      wr_en = !full && (($urandom % 100) < wp);
      din   = {$urandom, $urandom};
      rd_en = ($urandom % 100) < (100 - wp);
      if (rd_en && !empty) begin
        chk(model.size() > 0 && dout == model[0], "dout mismatch");
      end
      begin
        bit p, w;
        p = rd_en && !empty;
        w = wr_en && !full;
        @(posedge clk);
        if (p) void'(model.pop_front());
        if (w) model.push_back(din);
      end
    end
    chk(n_full > 0, "never reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
