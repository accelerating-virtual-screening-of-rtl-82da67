// Self-checking test of pri_ptr: the fuller input wins when both hold data,
// equal levels alternate, a single valid input is taken, nothing moves when
// the output FIFO is full, and the popped word is the one written.
module tb_pri_ptr;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, out_full, out_we;
  logic [1:0]  in_valid, in_pop;
  logic [63:0] in_data [2];
  logic [10:0] in_count [2];
  logic [63:0] out_data;

  pri_ptr #(.WIDTH(64), .CW(11)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("pri_ptr: %s", what);
    end
  endtask

  initial begin
    bit prev;
    rst_n = 1;
    #1 rst_n = 0; in_valid = 0; out_full = 0;
    in_data[0] = 64'hA0; in_data[1] = 64'hB1; in_count[0] = 0; in_count[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int c0, c1;
      @(negedge clk);
      in_valid    = 2'($urandom);
      out_full    = ($urandom % 8) == 0;
      c0          = $urandom_range(0, 3);
      c1          = $urandom_range(0, 3);
      in_count[0] = 11'(in_valid[0] ? c0 + 1 : 0);
      in_count[1] = 11'(in_valid[1] ? c1 + 1 : 0);
      in_data[0]  = {$urandom, $urandom};
      in_data[1]  = {$urandom, $urandom};
      #1;
      if (out_full || in_valid == 0) begin
        chk(!out_we && in_pop == 0, "moved while full or idle");
      end else begin
        int s;
        if (in_valid == 2'b01) s = 0;
        else if (in_valid == 2'b10) s = 1;
        else if (in_count[0] > in_count[1]) s = 0;
        else if (in_count[1] > in_count[0]) s = 1;
        else s = prev ? 0 : 1;
        chk(out_we, "no write");
        chk(in_pop == (s ? 2'b10 : 2'b01), $sformatf("wrong input popped t=%0d", t));
        chk(out_data == in_data[s], "wrong data");
        prev = s[0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
