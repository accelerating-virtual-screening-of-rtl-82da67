// Self-checking test of ph_octal_core. Group 2 with reference base 40: six
// of eight PUs are loaded, then 50 pharmacophore search fingerprints (some
// near copies of a reference, some random, some small) stream past back to
// back. With Dlimit = 0.5 (coefficient 2^16), the FIFO must receive, in
// order, exactly the pairs with Dlimit*sum(max) - sum(min) < 0, as
// {40+16+j, search index, sum(max), sum(min)}, the record of PU j readable
// 10+j cycles after its fingerprint's last word.
module tb_ph_octal_core;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam longint COEF = 65536;

  logic        rst_n, clear;
  fp_word_t    in;
  cfg_t        cfg;
  logic        fifo_rd_en, fifo_empty, afull, busy, overflow;
  result_t     fifo_dout;
  logic [10:0] fifo_count;

  ph_octal_core #(.CORE_ID(2)) dut (
    .clk, .rst_n, .clear, .in, .ref_base(12'd40), .cfg, .fifo_rd_en, .fifo_dout,
    .fifo_empty, .fifo_count, .afull, .busy, .overflow);

  logic [127:0] refw [8][14];
  result_t      exp_q [$];
  longint       cyc = 0, t_exp_first = -1, t_first = -1;
  int           n_rej = 0;

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
      if (failures < 10) $display("%t ph_octal_core: %s", $time, what);
    end
  endtask

  task automatic word(logic ld, int pu, int w, int sidx, logic [127:0] d);
    @(negedge clk);
    in = '0; in.valid = 1; in.load = ld; in.pu = 8'(pu); in.widx = 4'(w);
    in.last = (w == 13); in.sidx = 20'(sidx); in.data = d;
  endtask

  initial begin
    rst_n = 1;
    #1 rst_n = 0; clear = 0; in = '0; cfg = '0; fifo_rd_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cfg.we = 1; cfg.addr = 11'd5; cfg.data = 18'(COEF);
    @(negedge clk); cfg = '0;
    clear = 1; @(negedge clk); clear = 0;
    for (int j = 0; j < 6; j++)
      for (int w = 0; w < 14; w++) begin
        refw[j][w] = {$urandom, $urandom, $urandom, $urandom};
        word(1, 16 + j, w, 0, refw[j][w]);
      end
    for (int f = 0; f < 50; f++) begin
      logic [127:0] s [14];
      for (int w = 0; w < 14; w++) begin
        case (f % 3)
          0: for (int i = 0; i < 16; i++) s[w][8*i +: 8] = refw[f % 6][w][8*i +: 8] ^ 8'($urandom_range(0, 15));
          1: s[w] = {$urandom, $urandom, $urandom, $urandom};
          default: s[w] = {$urandom, $urandom, $urandom, $urandom} & {16{8'h1f}};
        endcase
        word(0, 0, w, 500 + f, s[w]);
      end
      for (int j = 0; j < 6; j++) begin
        longint mn, mx;
        mn = 0; mx = 0;
        for (int w = 0; w < 14; w++)
          for (int i = 0; i < 16; i++) begin
            int r, q;
            r = refw[j][w][8*i +: 8];
            q = s[w][8*i +: 8];
            mn += (r < q) ? r : q;
            mx += (r < q) ? q : r;
          end
        if (COEF * mx - (mn << 17) < 0) begin
          if (t_exp_first < 0) t_exp_first = cyc + 10 + j;
          exp_q.push_back('{ref_idx: 12'(56 + j), srch_idx: 20'(500 + f), hi: 16'(mx), lo: 16'(mn)});
        end else n_rej++;
      end
    end
    @(negedge clk); in = '0;
    repeat (30) @(negedge clk);
    chk(!busy, "busy after drain");
    chk(int'(fifo_count) == exp_q.size(), $sformatf("fifo holds %0d, expected %0d", fifo_count, exp_q.size()));
    chk(exp_q.size() > 10 && n_rej > 10, "threshold never splits the pairs");
    chk(t_first == t_exp_first, $sformatf("first record at %0d, expected %0d", t_first, t_exp_first));
    chk(!overflow && !afull, "overflow or afull");
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
