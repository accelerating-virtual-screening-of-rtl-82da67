// Full-size run of the accelerator with every parameter at its default:
// binary build, 128 PUs in 16 Octal Cores, 1024-word FIFOs, a 16-input HEM.
// Job 1: 200 references (a full batch of 128 and a partial one of 72)
// against 300 search fingerprints; job 2 in the other memory half: 130
// references against 50. Every record is checked against the model; the
// input must be hung at some point (nearly all pairs pass the threshold, so
// the output side limits the rate), and the HEM root must choose between
// two non-empty inputs.
module tb_vs_accel_full;
  import vs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        job_valid, job_ready, job_done, rd_req, rd_valid, wr_en, stalled, ovf, done;
  job_t        job;
  cfg_t        cfg;
  logic [31:0] results;
  logic [19:0] rd_addr, wr_addr;
  logic [127:0] rd_data, wr_data;
  int          checks, failures, batches, partial, stall, odd, acc, rej;
  int          n_prio = 0;

  vs_accel dut (
    .clk, .rst_n, .job_valid, .job_ready, .job, .job_done, .job_results(results), .cfg,
    .src_rd_req(rd_req), .src_rd_addr(rd_addr), .src_rd_valid(rd_valid), .src_rd_data(rd_data),
    .snk_wr_en(wr_en), .snk_wr_addr(wr_addr), .snk_wr_data(wr_data), .stalled, .overflow(ovf));

  vs_accel_harness #(.FP_TYPE(FP_BINARY), .N_PU(128), .N_REFS0(200), .N_SRCH0(300),
                     .N_REFS1(130), .N_SRCH1(50), .SEED(5)) h (
    .clk, .rst_n, .job_valid, .job_ready, .job, .job_done, .job_results(results), .cfg,
    .src_rd_req(rd_req), .src_rd_addr(rd_addr), .src_rd_valid(rd_valid), .src_rd_data(rd_data),
    .snk_wr_en(wr_en), .snk_wr_addr(wr_addr), .snk_wr_data(wr_data), .stalled, .overflow(ovf),
    .done, .checks, .failures, .n_batches(batches), .n_partial(partial), .n_stall(stall),
    .n_odd(odd), .n_accept(acc), .n_reject(rej));

  always @(posedge clk)
    if (dut.u_hem.g_node[1].u_sel.in_valid == 2'b11 && dut.u_hem.g_node[1].u_sel.out_we) n_prio++;

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint t0;
    rst_n = 1;
    #1 rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    t0 = $time;
    wait (done);
    checks += 3;
    if (stall == 0) begin failures++; $display("input never hung"); end
    if (n_prio == 0) begin failures++; $display("no HEM decision between two inputs"); end
    if (batches < 4 || partial < 2) begin failures++; $display("batches not exercised"); end
    $display("full size: %0d batches (%0d partial), %0d hung cycles, %0d HEM root decisions, %0d accepted, %0d rejected, %0d cycles",
             batches, partial, stall, n_prio, acc, rej, ($time - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
