// Test harness for the accelerator top (testbench use only).
//
// Owns the two SRAM models (source and sink), generates fingerprints, the
// threshold configuration and two jobs (first in the lower memory half,
// second in the upper half with other data and sizes), and checks the
// records in the sink memory against a model of the screening: every
// accepted pair exactly once with the right a+b and c (binary) or sum(max)
// and sum(min) (pharmacophore), nothing else. Search fingerprints are a mix
// of random ones and near copies of references so that the threshold both
// accepts and rejects. It also counts how often the design's mechanisms
// occurred: reference batches, partial batches, cycles with the input hung,
// odd record counts (a padded last sink word) and rejected pairs.
module vs_accel_harness
  import vs_pkg::*;
#(
  parameter fp_type_e    FP_TYPE = FP_BINARY,
  parameter int unsigned N_PU    = 128,
  parameter int unsigned N_REFS0 = 40,
  parameter int unsigned N_SRCH0 = 60,
  parameter int unsigned N_REFS1 = 9,
  parameter int unsigned N_SRCH1 = 25,
  parameter int unsigned SEED    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              job_valid,
  input  logic              job_ready,
  output job_t              job,
  input  logic              job_done,
  input  logic [31:0]       job_results,
  output cfg_t              cfg,
  input  logic              src_rd_req,
  input  logic [ADDR_W-1:0] src_rd_addr,
  output logic              src_rd_valid,
  output logic [WORD_W-1:0] src_rd_data,
  input  logic              snk_wr_en,
  input  logic [ADDR_W-1:0] snk_wr_addr,
  input  logic [WORD_W-1:0] snk_wr_data,
  input  logic              stalled,
  input  logic              overflow,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                n_batches,
  output int                n_partial,
  output int                n_stall,
  output int                n_odd,
  output int                n_accept,
  output int                n_reject
);
  localparam int W = (FP_TYPE == FP_BINARY) ? BIN_WORDS : PH_WORDS;
  localparam int REF_ADDR = 16, SINK_ADDR = 8;
  localparam longint PH_COEF = 52429;   // Dlimit = 0.4 with 17 fraction bits

  logic         unused_rd;
  logic [127:0] unused_data;
  logic         wr_unused;
  int           srch_addr;

  sram_model #(.ADDR_W(ADDR_W)) u_src (
    .clk, .rd_req(src_rd_req), .rd_addr(src_rd_addr), .rd_valid(src_rd_valid),
    .rd_data(src_rd_data), .wr_en(1'b0), .wr_addr('0), .wr_data('0));
  sram_model #(.ADDR_W(ADDR_W)) u_snk (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_valid(unused_rd), .rd_data(unused_data),
    .wr_en(snk_wr_en), .wr_addr(snk_wr_addr), .wr_data(snk_wr_data));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t harness(%s): %s", $time, FP_TYPE.name(), what);
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // binary threshold Dlimit = 0.5: MEM[c] = (2-0.5)/(1-0.5) * c = 3c
  function automatic int tab(int c);
    return (3 * c > 4095) ? 4095 : 3 * c;
  endfunction

  always @(posedge clk) if (rst_n && stalled) n_stall++;

  // One job: fill the chosen half, run, check the records.
  task automatic run_job(bit half, int nref, int nsrch);
    logic [127:0] rf [][];
    logic [127:0] sf [][];
    result_t      exp_rec [longint];
    int           base;
    base = half ? (1 << (ADDR_W - 1)) : 0;
    srch_addr = REF_ADDR + nref * W + 4;
    rf = new[nref];
    sf = new[nsrch];
    for (int r = 0; r < nref; r++) begin
      rf[r] = new[W];
      for (int w = 0; w < W; w++) begin
        rf[r][w] = (FP_TYPE == FP_BINARY && r % 4 == 1) ? (rnd128() & rnd128()) : rnd128();
        u_src.poke(base + REF_ADDR + r * W + w, rf[r][w]);
      end
    end
    for (int s = 0; s < nsrch; s++) begin
      sf[s] = new[W];
      for (int w = 0; w < W; w++) begin
        if (s % 3 == 0) begin
          // near copy of a reference
          if (FP_TYPE == FP_BINARY)
            sf[s][w] = rf[s % nref][w] ^ (rnd128() & rnd128() & rnd128() & rnd128());
          else
            for (int i = 0; i < 16; i++)
              sf[s][w][8*i +: 8] = rf[s % nref][w][8*i +: 8] ^ 8'($urandom_range(0, 7));
        end else if (FP_TYPE == FP_PHARMA && s % 3 == 2) begin
          sf[s][w] = rnd128() & {16{8'h1f}};     // small bins: dissimilar
        end else begin
          sf[s][w] = rnd128();
        end
        u_src.poke(base + srch_addr + s * W + w, sf[s][w]);
      end
    end
    // model
    for (int r = 0; r < nref; r++)
      for (int s = 0; s < nsrch; s++) begin
        bit acc;
        result_t e;
        if (FP_TYPE == FP_BINARY) begin
          int a, b, c;
          a = 0; b = 0; c = 0;
          for (int w = 0; w < W; w++) begin
            a += $countones(rf[r][w]);
            b += $countones(sf[s][w]);
            c += $countones(rf[r][w] & sf[s][w]);
          end
          acc = (a + b) > tab(c);
          e = '{ref_idx: 12'(r), srch_idx: 20'(s), hi: 16'(a + b), lo: 16'(c)};
        end else begin
          longint mn, mx;
          mn = 0; mx = 0;
          for (int w = 0; w < W; w++)
            for (int i = 0; i < 16; i++) begin
              int x, y;
              x = rf[r][w][8*i +: 8];
              y = sf[s][w][8*i +: 8];
              mn += (x < y) ? x : y;
              mx += (x < y) ? y : x;
            end
          acc = (PH_COEF * mx - (mn << 17)) < 0;
          e = '{ref_idx: 12'(r), srch_idx: 20'(s), hi: 16'(mx), lo: 16'(mn)};
        end
        if (acc) begin
          exp_rec[longint'(r) * 1_000_000 + s] = e;
          n_accept++;
        end else n_reject++;
      end
    n_batches += (nref + N_PU - 1) / N_PU;
    if (nref % N_PU != 0) n_partial++;
    // start
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job.half      = half;
    job.ref_addr  = (ADDR_W-1)'(REF_ADDR);
    job.num_refs  = (REF_IDX_W+1)'(nref);
    job.srch_addr = (ADDR_W-1)'(srch_addr);
    job.num_srch  = (SRCH_IDX_W+1)'(nsrch);
    job.sink_addr = (ADDR_W-1)'(SINK_ADDR);
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    while (!job_done) @(negedge clk);
    // check
    chk(int'(job_results) == exp_rec.num(),
        $sformatf("job reported %0d records, model %0d", job_results, exp_rec.num()));
    if (job_results % 2 == 1) n_odd++;
    for (int k = 0; k < int'(job_results); k++) begin
      logic [127:0] wd;
      result_t rec;
      longint key;
      wd  = u_snk.peek(base + SINK_ADDR + k / 2);
      rec = (k % 2 == 0) ? wd[63:0] : wd[127:64];
      key = longint'(rec.ref_idx) * 1_000_000 + longint'(rec.srch_idx);
      if (!exp_rec.exists(key)) begin
        chk(0, $sformatf("unexpected or repeated record ref %0d search %0d", rec.ref_idx, rec.srch_idx));
      end else begin
        chk(rec == exp_rec[key], $sformatf("record ref %0d search %0d has wrong sums", rec.ref_idx, rec.srch_idx));
        exp_rec.delete(key);
      end
    end
    chk(exp_rec.num() == 0, $sformatf("%0d accepted pairs missing", exp_rec.num()));
    if (job_results % 2 == 1) begin
      logic [127:0] wd;
      wd = u_snk.peek(base + SINK_ADDR + job_results / 2);
      chk(wd[127:64] == '0, "padding of the last sink word");
    end
  endtask

  initial begin
    void'($urandom(SEED));
    done = 0; checks = 0; failures = 0; n_batches = 0; n_partial = 0; n_stall = 0;
    n_odd = 0; n_accept = 0; n_reject = 0;
    job_valid = 0; job = '0; cfg = '0;
    @(posedge rst_n);
    // threshold configuration
    if (FP_TYPE == FP_BINARY) begin
      for (int c = 0; c <= BIN_WORDS * WORD_W; c++) begin
        @(negedge clk);
        cfg.we = 1; cfg.addr = CFG_ADDR_W'(c); cfg.data = CFG_DATA_W'(tab(c));
      end
    end else begin
      @(negedge clk);
      cfg.we = 1; cfg.addr = '0; cfg.data = CFG_DATA_W'(PH_COEF);
    end
    @(negedge clk);
    cfg = '0;
    run_job(0, N_REFS0, N_SRCH0);
    run_job(1, N_REFS1, N_SRCH1);
    chk(!overflow, "an output FIFO overflowed");
    done = 1;
  end
endmodule
