// Self-checking test of ppu: a mix of reference fingerprints (tagged with a
// PU number) and search fingerprints (tagged with an index), with random
// gaps. Each count must equal the fingerprint's number of '1' bits, carry
// the fingerprint's tag, and appear exactly 8 cycles after its last word.
module tb_ppu;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, out_valid, out_load, busy;
  fp_word_t    in;
  logic [7:0]  out_pu;
  logic [19:0] out_sidx;
  logic [10:0] out_cnt;

  typedef struct {
    int     cnt;
    bit     load;
    int     pu;
    int     sidx;
    longint t;
  } exp_t;
  exp_t   exp_q [$];
  longint cyc = 0;
  int     n_out = 0;

  ppu #(.W(8)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t ppu: %s", $time, what);
    end
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    n_out++;
    chk(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      exp_t e;
      e = exp_q.pop_front();
      chk(int'(out_cnt) == e.cnt, $sformatf("count %0d exp %0d", out_cnt, e.cnt));
      chk(out_load == e.load, "load flag");
      if (e.load) chk(int'(out_pu) == e.pu, "pu tag");
      else        chk(int'(out_sidx) == e.sidx, "search index tag");
      chk(cyc - e.t == 8, $sformatf("latency %0d", cyc - e.t));
    end
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0; in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 80; f++) begin
      exp_t e;
      bit ld;
      ld = (f < 20) || (f % 7 == 0);
      e.cnt = 0; e.load = ld; e.pu = f % 128; e.sidx = f * 3 + 1;
      for (int w = 0; w < 8; w++) begin
        logic [127:0] d;
        d = {$urandom, $urandom, $urandom, $urandom};
        if (f == 5) d = '1;
        if (f == 6) d = '0;
        e.cnt += $countones(d);
        if ($urandom % 3 == 0) begin
          @(negedge clk);
          in = '0;
        end
        @(negedge clk);
        in = '0;
        in.valid = 1; in.load = ld; in.pu = 8'(e.pu); in.sidx = 20'(e.sidx);
        in.widx = 4'(w); in.last = (w == 7); in.data = d;
      end
      e.t = cyc;
      exp_q.push_back(e);
    end
    @(negedge clk);
    in = '0;
    repeat (20) @(negedge clk);
    chk(n_out == 80, $sformatf("%0d outputs", n_out));
    chk(!busy, "busy after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
