// Self-checking test of ph_pu: load a 14-word pharmacophore reference, then
// stream search fingerprints with random gaps. sum(min) and sum(max) over
// all 224 byte bins must match a model and appear exactly 6 cycles after
// the last word. Includes the all-255 extreme (57120) and a self-compare.
module tb_ph_pu;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, clear, load_sel, s_valid, loaded, busy;
  fp_word_t    in;
  logic [15:0] sum_min, sum_max;
  logic [127:0] refw [14];
  int          emin [$], emax [$];
  longint      et [$];
  longint      cyc = 0;
  int          n_out = 0;

  ph_pu #(.W(14)) dut (.*);

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
      if (failures < 10) $display("%t ph_pu: %s", $time, what);
    end
  endtask

  task automatic send(logic ld, logic sel, int w, logic [127:0] d);
    @(negedge clk);
    in = '0; in.valid = 1; in.load = ld; in.widx = 4'(w); in.last = (w == 13); in.data = d;
    load_sel = sel;
  endtask

  always @(negedge clk) if (rst_n && s_valid) begin
    n_out++;
    chk(emin.size() > 0, "unexpected output");
    if (emin.size() > 0) begin
      int mn, mx;
      longint t;
      mn = emin.pop_front(); mx = emax.pop_front(); t = et.pop_front();
      chk(int'(sum_min) == mn && int'(sum_max) == mx,
          $sformatf("sums %0d/%0d exp %0d/%0d", sum_min, sum_max, mn, mx));
      chk(cyc - t == 6, $sformatf("latency %0d", cyc - t));
    end
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0; clear = 0; in = '0; load_sel = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 14; w++) send(1, 0, w, '0);
    for (int w = 0; w < 14; w++) begin
      refw[w] = {$urandom, $urandom, $urandom, $urandom};
      send(1, 1, w, refw[w]);
    end
    @(negedge clk); in = '0; load_sel = 0;
    chk(loaded, "not loaded");
    for (int f = 0; f < 50; f++) begin
      int mn, mx;
      mn = 0; mx = 0;
      for (int w = 0; w < 14; w++) begin
        logic [127:0] s;
        s = {$urandom, $urandom, $urandom, $urandom};
        if (f == 3) s = '1;
        if (f == 4) s = refw[w];
        for (int i = 0; i < 16; i++) begin
          int r, q;
          r = refw[w][8*i +: 8];
          q = s[8*i +: 8];
          mn += (r < q) ? r : q;
          mx += (r < q) ? q : r;
        end
        if ($urandom % 4 == 0) begin
          @(negedge clk); in = '0;
        end
        send(0, 0, w, s);
      end
      emin.push_back(mn); emax.push_back(mx); et.push_back(cyc);
    end
    @(negedge clk); in = '0;
    repeat (20) @(negedge clk);
    chk(n_out == 50, $sformatf("%0d outputs", n_out));
    chk(!busy, "busy after drain");
    clear = 1; @(negedge clk); clear = 0;
    chk(!loaded, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
