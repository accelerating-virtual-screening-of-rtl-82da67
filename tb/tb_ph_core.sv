// Self-checking test of ph_core with 16 PUs (two groups of eight).
// Two batches: 13 references with reference base 0, then (after clear) 5
// with base 16; each followed by 30 search fingerprints streamed back to
// back. The coefficient is Dlimit = 0.4 (Eq. 7). All records from both output
// FIFOs together must be exactly the model's accepted pairs, each core's
// records must name only its own PUs, and busy/fifo_busy must fall at the end.
module tb_ph_core;
  import vs_pkg::*;
  localparam int NPU = 16, W = 14;
  localparam longint COEF = 52429;   // Dlimit = 0.4
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, clear, afull, busy, fifo_busy, overflow;
  fp_word_t    in;
  logic [11:0] ref_base;
  cfg_t        cfg;
  logic [1:0]  fifo_rd_en, fifo_empty;
  result_t     fifo_dout [2];
  logic [10:0] fifo_count [2];

  ph_core #(.N_PU(NPU)) dut (.*);

  result_t     exp_rec [longint];
  int          n_acc = 0, n_rej = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t ph_core: %s", $time, what);
    end
  endtask

  task automatic word(logic ld, int pu, int w, int sidx, logic [127:0] d);
    @(negedge clk);
    in = '0; in.valid = 1; in.load = ld; in.pu = 8'(pu); in.widx = 4'(w);
    in.last = (w == W - 1); in.sidx = 20'(sidx); in.data = d;
  endtask

  task automatic batch(int base, int nref, int nsrch);
    logic [127:0] rf [16][W];
    @(negedge clk); in = '0; clear = 1; ref_base = 12'(base);
    @(negedge clk); clear = 0;
    for (int r = 0; r < nref; r++)
      for (int w = 0; w < W; w++) begin
        rf[r][w] = {$urandom, $urandom, $urandom, $urandom};
        word(1, r, w, 0, rf[r][w]);
      end
    for (int s = 0; s < nsrch; s++) begin
      logic [127:0] sf [W];
      for (int w = 0; w < W; w++) begin
        sf[w] = (s % 2 == 0) ? {$urandom, $urandom, $urandom, $urandom}
                             : {$urandom, $urandom, $urandom, $urandom} & {16{8'h3f}};
        word(0, 0, w, s, sf[w]);
      end
      for (int r = 0; r < nref; r++) begin
        longint mn, mx;
        mn = 0; mx = 0;
        for (int w = 0; w < W; w++)
          for (int i = 0; i < 16; i++) begin
            int x, y;
            x = rf[r][w][8*i +: 8];
            y = sf[w][8*i +: 8];
            mn += (x < y) ? x : y;
            mx += (x < y) ? y : x;
          end
        if (COEF * mx - (mn << 17) < 0) begin
          exp_rec[longint'(base + r) * 1_000_000 + s] = '{ref_idx: 12'(base + r), srch_idx: 20'(s), hi: 16'(mx), lo: 16'(mn)};
          n_acc++;
        end else n_rej++;
      end
    end
    @(negedge clk); in = '0;
    while (busy) @(negedge clk);
  endtask

  // drain both FIFOs continuously
  always @(negedge clk) begin
    fifo_rd_en = '0;
    if (rst_n)
      for (int k = 0; k < 2; k++)
        if (!fifo_empty[k]) begin
          longint key;
          result_t r;
          r = fifo_dout[k];
          key = longint'(r.ref_idx) * 1_000_000 + longint'(r.srch_idx);
          chk((int'(r.ref_idx) % NPU) / 8 == k, "record from the wrong Octal Core");
          if (exp_rec.exists(key)) begin
            chk(exp_rec[key] == r, "record sums");
            exp_rec.delete(key);
          end else chk(0, $sformatf("unexpected record %0d/%0d", r.ref_idx, r.srch_idx));
          fifo_rd_en[k] = 1;
        end
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0; clear = 0; in = '0; cfg = '0; ref_base = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cfg.we = 1; cfg.addr = '0; cfg.data = 18'(COEF);
    @(negedge clk); cfg = '0;
    batch(0, 13, 30);
    batch(16, 5, 30);
    repeat (40) @(negedge clk);
    chk(exp_rec.num() == 0, $sformatf("%0d records missing", exp_rec.num()));
    chk(!busy && !fifo_busy && !overflow && !afull, "status at the end");
    chk(n_acc > 10 && n_rej > 10, "threshold never splits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
