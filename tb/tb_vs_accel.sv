// End-to-end test of the accelerator, both builds, at reduced size: the
// binary build with 16 PUs (two Octal Cores, a two-input HEM), the
// pharmacophore build with 32 PUs (four groups, a four-input HEM), both
// with 64-word FIFOs and a large almost-full margin so that the input is
// hung often. Each build runs two jobs (both memory halves), the first with
// 40 references (binary: batches of 16, 16 and a partial 8; pharmacophore:
// 32 and a partial 8) against 60 search fingerprints, the second 9 against
// 25. The harness checks every record. The test also counts, and
// fails if any never happened: reference reload between batches, partial
// batches, input hang, a HEM decision between two non-empty inputs,
// accepted and rejected pairs, and a padded odd last sink word.
module tb_vs_accel;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  int   checks, failures;
  int   n_prio_b = 0, n_prio_p = 0;

  // ---- binary build ----
  logic        b_job_valid, b_job_ready, b_job_done, b_rd_req, b_rd_valid, b_wr_en, b_stalled, b_ovf, b_done;
  job_t        b_job;
  cfg_t        b_cfg;
  logic [31:0] b_results;
  logic [19:0] b_rd_addr, b_wr_addr;
  logic [127:0] b_rd_data, b_wr_data;
  int          b_checks, b_fail, b_batches, b_partial, b_stall, b_odd, b_acc, b_rej;

  vs_accel #(.FP_TYPE(FP_BINARY), .N_PU(16), .FIFO_DEPTH(64), .AFULL_MARGIN(40)) dut_b (
    .clk, .rst_n, .job_valid(b_job_valid), .job_ready(b_job_ready), .job(b_job), .job_done(b_job_done),
    .job_results(b_results), .cfg(b_cfg), .src_rd_req(b_rd_req), .src_rd_addr(b_rd_addr),
    .src_rd_valid(b_rd_valid), .src_rd_data(b_rd_data), .snk_wr_en(b_wr_en), .snk_wr_addr(b_wr_addr),
    .snk_wr_data(b_wr_data), .stalled(b_stalled), .overflow(b_ovf));

  vs_accel_harness #(.FP_TYPE(FP_BINARY), .N_PU(16), .SEED(11)) h_b (
    .clk, .rst_n, .job_valid(b_job_valid), .job_ready(b_job_ready), .job(b_job), .job_done(b_job_done),
    .job_results(b_results), .cfg(b_cfg), .src_rd_req(b_rd_req), .src_rd_addr(b_rd_addr),
    .src_rd_valid(b_rd_valid), .src_rd_data(b_rd_data), .snk_wr_en(b_wr_en), .snk_wr_addr(b_wr_addr),
    .snk_wr_data(b_wr_data), .stalled(b_stalled), .overflow(b_ovf), .done(b_done),
    .checks(b_checks), .failures(b_fail), .n_batches(b_batches), .n_partial(b_partial),
    .n_stall(b_stall), .n_odd(b_odd), .n_accept(b_acc), .n_reject(b_rej));

  // ---- pharmacophore build ----
  logic        p_job_valid, p_job_ready, p_job_done, p_rd_req, p_rd_valid, p_wr_en, p_stalled, p_ovf, p_done;
  job_t        p_job;
  cfg_t        p_cfg;
  logic [31:0] p_results;
  logic [19:0] p_rd_addr, p_wr_addr;
  logic [127:0] p_rd_data, p_wr_data;
  int          p_checks, p_fail, p_batches, p_partial, p_stall, p_odd, p_acc, p_rej;

  vs_accel #(.FP_TYPE(FP_PHARMA), .N_PU(32), .FIFO_DEPTH(64), .AFULL_MARGIN(40)) dut_p (
    .clk, .rst_n, .job_valid(p_job_valid), .job_ready(p_job_ready), .job(p_job), .job_done(p_job_done),
    .job_results(p_results), .cfg(p_cfg), .src_rd_req(p_rd_req), .src_rd_addr(p_rd_addr),
    .src_rd_valid(p_rd_valid), .src_rd_data(p_rd_data), .snk_wr_en(p_wr_en), .snk_wr_addr(p_wr_addr),
    .snk_wr_data(p_wr_data), .stalled(p_stalled), .overflow(p_ovf));

  vs_accel_harness #(.FP_TYPE(FP_PHARMA), .N_PU(32), .SEED(23)) h_p (
    .clk, .rst_n, .job_valid(p_job_valid), .job_ready(p_job_ready), .job(p_job), .job_done(p_job_done),
    .job_results(p_results), .cfg(p_cfg), .src_rd_req(p_rd_req), .src_rd_addr(p_rd_addr),
    .src_rd_valid(p_rd_valid), .src_rd_data(p_rd_data), .snk_wr_en(p_wr_en), .snk_wr_addr(p_wr_addr),
    .snk_wr_data(p_wr_data), .stalled(p_stalled), .overflow(p_ovf), .done(p_done),
    .checks(p_checks), .failures(p_fail), .n_batches(p_batches), .n_partial(p_partial),
    .n_stall(p_stall), .n_odd(p_odd), .n_accept(p_acc), .n_reject(p_rej));

  // HEM root decisions between two non-empty inputs
  always @(posedge clk) begin
    if (dut_b.u_hem.g_node[1].u_sel.in_valid == 2'b11 && dut_b.u_hem.g_node[1].u_sel.out_we) n_prio_b++;
    if (dut_p.u_hem.g_node[1].u_sel.in_valid == 2'b11 && dut_p.u_hem.g_node[1].u_sel.out_we) n_prio_p++;
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", b_checks + p_checks, b_fail + p_fail + 1);
    $finish;
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (b_done && p_done);
    checks   = b_checks + p_checks;
    failures = b_fail + p_fail;
    need(b_batches > 2 ? 1 : 0, "binary: reference reload");
    need(p_batches > 1 ? 1 : 0, "pharmacophore: reference reload");
    need(b_partial, "binary: partial batch");
    need(p_partial, "pharmacophore: partial batch");
    need(b_stall, "binary: input hung");
    need(p_stall, "pharmacophore: input hung");
    need(n_prio_b, "binary: HEM priority decision");
    need(n_prio_p, "pharmacophore: HEM priority decision");
    need(b_acc, "binary: accepted pair");
    need(b_rej, "binary: rejected pair");
    need(p_acc, "pharmacophore: accepted pair");
    need(p_rej, "pharmacophore: rejected pair");
    need(b_odd + p_odd, "padded last sink word");
    $display("binary: %0d batches (%0d partial), %0d hung cycles, %0d HEM decisions, %0d accepted, %0d rejected, %0d odd",
             b_batches, b_partial, b_stall, n_prio_b, b_acc, b_rej, b_odd);
    $display("pharmacophore: %0d batches (%0d partial), %0d hung cycles, %0d HEM decisions, %0d accepted, %0d rejected, %0d odd",
             p_batches, p_partial, p_stall, n_prio_p, p_acc, p_rej, p_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
