// Self-checking test of cmpr_ram: fill the 1025-word table with the
// threshold formula floor(c*13/3) (Dlimit = 0.7), saturated to 12 bits,
// then read every word back in random order, checking the one-cycle read
// latency; writes beyond the table must not disturb it.
module tb_cmpr_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [10:0] waddr, raddr;
  logic [11:0] wdata, rdata;

  cmpr_ram #(.DEPTH(1025), .DW(12)) dut (.*);

  function automatic logic [11:0] tab(int c);
    int v;
    v = (c * 13) / 3;
    return (v > 4095) ? 12'hfff : 12'(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int c = 0; c <= 1024; c++) begin
      @(negedge clk);
      we = 1; waddr = 11'(c); wdata = tab(c);
    end
    @(negedge clk);
    waddr = 11'd1500; wdata = 12'h0;     // outside the table
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      int c;
      c = $urandom_range(0, 1024);
      raddr = 11'(c);
      @(negedge clk);
      checks++;
      if (rdata !== tab(c)) begin
        failures++;
        if (failures < 10) $display("MEM[%0d] = %0d exp %0d", c, rdata, tab(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
