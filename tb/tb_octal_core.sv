// Self-checking test of octal_core (with the PPU that feeds it). Core 1 of
// a Processing Core with reference base 100: seven of its eight PUs are
// loaded (a partial batch), then 60 search fingerprints of varied bit
// density stream past back to back, one word per cycle. The CMPR RAM holds
// floor(c*13/3) (Dlimit = 0.7). The FIFO must receive, in order, exactly the
// pairs with a+b > floor(13c/3), as {100+8+j, search index, a+b, c}, the
// record of PU j readable 12+j cycles after its fingerprint's last word; afull
// must track the fill level (margin set so that it rises).
module tb_octal_core;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, clear;
  fp_word_t    in;
  logic        p_valid, p_load, p_busy;
  logic [7:0]  p_pu;
  logic [19:0] p_sidx;
  logic [10:0] p_cnt;
  cfg_t        cfg;
  logic        fifo_rd_en, fifo_empty, afull, busy, overflow;
  result_t     fifo_dout;
  logic [10:0] fifo_count;

  ppu #(.W(8)) u_ppu (.clk, .rst_n, .in, .out_valid(p_valid), .out_load(p_load), .out_pu(p_pu),
                      .out_sidx(p_sidx), .out_cnt(p_cnt), .busy(p_busy));
  octal_core #(.CORE_ID(1), .AFULL_MARGIN(1000)) dut (
    .clk, .rst_n, .clear, .in, .ref_base(12'd100), .ppu_valid(p_valid), .ppu_load(p_load),
    .ppu_pu(p_pu), .ppu_sidx(p_sidx), .ppu_cnt(p_cnt), .cfg, .fifo_rd_en, .fifo_dout,
    .fifo_empty, .fifo_count, .afull, .busy, .overflow);

  logic [127:0] refw [8][8];
  int           ra [8];
  result_t      exp_q [$];
  longint       cyc = 0, t_exp_first = -1, t_first = -1;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (t_first < 0 && !fifo_empty) t_first = cyc;

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
      if (failures < 10) $display("%t octal_core: %s", $time, what);
    end
  endtask

  function automatic int tab(int c);
    int v;
    v = (c * 13) / 3;
    return (v > 4095) ? 4095 : v;
  endfunction

  task automatic word(logic ld, int pu, int w, int sidx, logic [127:0] d);
    @(negedge clk);
    in = '0; in.valid = 1; in.load = ld; in.pu = 8'(pu); in.widx = 4'(w);
    in.last = (w == 7); in.sidx = 20'(sidx); in.data = d;
  endtask

  initial begin
    rst_n = 1;
    #1 rst_n = 0; clear = 0; in = '0; cfg = '0; fifo_rd_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c <= 1024; c++) begin
      @(negedge clk);
      cfg.we = 1; cfg.addr = 11'(c); cfg.data = 18'(tab(c));
    end
    @(negedge clk); cfg = '0;
    clear = 1; @(negedge clk); clear = 0;
    // Step 1: PUs 8..14 (this core's j = 0..6); PU 3 belongs elsewhere
    for (int j = 0; j < 7; j++) begin
      ra[j] = 0;
      for (int w = 0; w < 8; w++) begin
        refw[j][w] = {$urandom, $urandom, $urandom, $urandom};
        ra[j] += $countones(refw[j][w]);
        word(1, 8 + j, w, 0, refw[j][w]);
      end
    end
    for (int w = 0; w < 8; w++) word(1, 3, w, 0, '1);
    // Step 2: back to back
    for (int f = 0; f < 60; f++) begin
      logic [127:0] s [8];
      int b;
      b = 0;
      for (int w = 0; w < 8; w++) begin
        case (f % 3)
          0: s[w] = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
          1: s[w] = {$urandom, $urandom, $urandom, $urandom};
          default: s[w] = {$urandom, $urandom, $urandom, $urandom} | {$urandom, $urandom, $urandom, $urandom};
        endcase
        if (f == 10) s[w] = refw[2][w];
        b += $countones(s[w]);
        word(0, 0, w, 1000 + f, s[w]);
      end
      for (int j = 0; j < 7; j++) begin
        int c;
        c = 0;
        for (int w = 0; w < 8; w++) c += $countones(s[w] & refw[j][w]);
        if (ra[j] + b > tab(c) && t_exp_first < 0) t_exp_first = cyc + 12 + j;
        if (ra[j] + b > tab(c))
          exp_q.push_back('{ref_idx: 12'(108 + j), srch_idx: 20'(1000 + f), hi: 16'(ra[j] + b), lo: 16'(c)});
      end
    end
    @(negedge clk); in = '0;
    repeat (30) @(negedge clk);
    chk(!busy, "busy after drain");
    chk(int'(fifo_count) == exp_q.size(), $sformatf("fifo holds %0d, expected %0d", fifo_count, exp_q.size()));
    chk(afull == (int'(fifo_count) > 24), "afull");
    chk(exp_q.size() > 20 && exp_q.size() < 7 * 60, "threshold never splits the pairs");
    chk(t_first == t_exp_first, $sformatf("first record at %0d, expected %0d", t_first, t_exp_first));
    chk(!overflow, "overflow");
    while (!fifo_empty) begin
      result_t e;
      e = exp_q.size() ? exp_q.pop_front() : '0;
      chk(fifo_dout == e, $sformatf("record %h exp %h", fifo_dout, e));
      fifo_rd_en = 1;
      @(negedge clk);
      fifo_rd_en = 0;
      @(negedge clk);
    end
    chk(exp_q.size() == 0, "records missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
