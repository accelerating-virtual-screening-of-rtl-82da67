// Self-checking test of bin_pu: load a reference (with other references
// streaming past that must not be stored), deliver a, then stream search
// fingerprints with random gaps between words. Every c must equal the
// number of bits set in both fingerprints and appear exactly 8 cycles after
// the fingerprint's last word; clear must drop the loaded flag.
module tb_bin_pu;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, clear, load_sel, a_we, c_valid, loaded, busy;
  fp_word_t    in;
  logic [10:0] a_in, c, a;
  logic [127:0] refw [8];
  int          exp_c [$];
  longint      exp_t [$];
  longint      cyc = 0;
  int          n_out = 0;

  bin_pu #(.W(8)) dut (.*);

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
      if (failures < 10) $display("%t bin_pu: %s", $time, what);
    end
  endtask

  task automatic send(logic ld, logic sel, int w, logic [127:0] d, int sidx);
    @(negedge clk);
    in       = '0;
    in.valid = 1;
    in.load  = ld;
    in.widx  = 4'(w);
    in.last  = (w == 7);
    in.sidx  = 20'(sidx);
    in.data  = d;
    load_sel = sel;
  endtask

  task automatic idle();
    @(negedge clk);
    in = '0;
    load_sel = 0;
  endtask

  // output monitor
  always @(negedge clk) if (rst_n && c_valid) begin
    n_out++;
    chk(exp_c.size() > 0, "unexpected c_valid");
    if (exp_c.size() > 0) begin
      int e;
      longint tl;
      e  = exp_c.pop_front();
      tl = exp_t.pop_front();
      chk(int'(c) == e, $sformatf("c=%0d exp %0d", c, e));
      chk(cyc - tl == 8, $sformatf("latency %0d, expected 8", cyc - tl));
    end
  end

  initial begin
    int pc;
    rst_n = 1;
    #1 rst_n = 0; clear = 0; in = '0; load_sel = 0; a_we = 0; a_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // another PU's reference passes by
    for (int w = 0; w < 8; w++) send(1, 0, w, '1, 0);
    pc = 0;
    for (int w = 0; w < 8; w++) begin
      refw[w] = {$urandom, $urandom, $urandom, $urandom};
      pc += $countones(refw[w]);
      send(1, 1, w, refw[w], 0);
    end
    for (int w = 0; w < 8; w++) send(1, 0, w, '1, 0);
    idle();
    chk(!loaded, "loaded before a arrived");
    @(negedge clk); a_we = 1; a_in = 11'(pc);
    @(negedge clk); a_we = 0;
    chk(loaded && int'(a) == pc, "a not stored");
    for (int f = 0; f < 60; f++) begin
      int e;
      logic [127:0] mask;
      e = 0;
      mask = (f % 10 == 3) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 8; w++) begin
        logic [127:0] s;
        s = {$urandom, $urandom, $urandom, $urandom} & mask;
        if (f % 10 == 4) s = refw[w];
        e += $countones(s & refw[w]);
        if ($urandom % 4 == 0) idle();
        send(0, 0, w, s, f);
        if (w == 7) begin
          exp_c.push_back(e);
          exp_t.push_back(cyc);
        end
      end
    end
    idle();
    repeat (20) @(negedge clk);
    chk(n_out == 60, $sformatf("%0d results, expected 60", n_out));
    chk(!busy, "busy after drain");
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(!loaded, "clear did not empty the PU");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
