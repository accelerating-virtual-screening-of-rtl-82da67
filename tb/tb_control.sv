// Self-checking test of the control block with N_PU = 8 and a model of the
// Processing Core around it. Job: 20 references (batches of 8, 8 and a
// partial 4) against 5 search fingerprints, in the upper memory half. The
// word stream handed to the core must be exactly: per batch, a clear, the
// batch's reference words tagged with their PU, then all search words
// tagged with their index, each carrying the data of the right address;
// no new batch may start while the modelled core is still busy. core_afull
// is raised for a while: the control must hang its reads then. Meanwhile
// 13 records are offered at the HEM port; they must land packed two per
// sink word (the odd one padded), and job_done must report 13. A second job
// with no references must finish at once with no reads.
module tb_control;
  import vs_pkg::*;
  localparam int NPU = 8, W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, job_valid, job_ready, job_done;
  job_t        job;
  logic [31:0] job_results;
  logic        rd_req, rd_valid, clear, core_afull, core_busy, res_valid, res_pop, wr_en, stalled;
  logic [19:0] rd_addr, wr_addr;
  logic [127:0] rd_data, wr_data;
  fp_word_t    core_in;
  logic [11:0] ref_base;
  logic [63:0] res_data;

  control #(.N_PU(NPU), .W(W), .TAG_DEPTH(8)) dut (
    .clk, .rst_n, .job_valid, .job_ready, .job, .job_done, .job_results,
    .rd_req, .rd_addr, .rd_valid, .rd_data, .core_in, .clear, .ref_base,
    .core_afull, .core_busy, .core_fifo_busy(1'b0), .hem_busy(1'b0),
    .res_valid, .res_data, .res_pop, .wr_en, .wr_addr, .wr_data, .stalled);

  sram_model #(.ADDR_W(20)) u_mem (
    .clk, .rd_req, .rd_addr, .rd_valid, .rd_data, .wr_en, .wr_addr, .wr_data);

  typedef struct {
    bit clr;
    bit load;
    int pu;
    int widx;
    int sidx;
    int addr;
    int base;
  } ev_t;
  ev_t    exp_q [$];
  int     busy_cnt = 0, n_stall = 0, n_stall_bad = 0, n_clear = 0, n_words = 0, n_rec = 0;
  longint cyc = 0;
  logic   rd_req_q;
  bit     prev_stalled = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t control: %s", $time, what);
    end
  endtask

  // core model: busy for 12 cycles after the last word it saw
  assign core_busy = busy_cnt != 0;

  always @(negedge clk) if (rst_n) begin
    if (stalled) n_stall++;
    if (prev_stalled && rd_req) n_stall_bad++;
    prev_stalled = stalled;
    if (clear) begin
      ev_t e;
      n_clear++;
      chk(!core_busy, "batch started while the core was busy");
      e = exp_q.size() ? exp_q.pop_front() : '{default: 0};
      chk(e.clr, "unexpected clear");
      chk(int'(ref_base) == e.base, $sformatf("ref_base %0d exp %0d", ref_base, e.base));
    end
    if (core_in.valid) begin
      ev_t e;
      n_words++;
      e = exp_q.size() ? exp_q.pop_front() : '{default: 0, clr: 1};
      chk(!e.clr && core_in.load == e.load && int'(core_in.widx) == e.widx
          && core_in.last == (e.widx == W - 1)
          && (e.load ? int'(core_in.pu) == e.pu : int'(core_in.sidx) == e.sidx),
          $sformatf("tag of word %0d wrong", n_words));
      chk(core_in.data == u_mem.init_word(e.addr), $sformatf("data of word %0d wrong", n_words));
    end
  end

  always @(posedge clk) begin
    if (core_in.valid) busy_cnt <= 12;
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
  end

  // records offered at the HEM port
  initial begin
    res_valid = 0; res_data = '0;
    @(posedge rst_n);
    for (int r = 0; r < 13; r++) begin
      repeat ($urandom_range(5, 40)) @(negedge clk);
      res_valid = 1; res_data = {32'hC0DE0000 | r, 32'(r)};
      @(negedge clk);
      while (!res_pop) @(negedge clk);
      res_valid = 0;
    end
  end

  initial begin
    int base_ref = 100, base_srch = 3000, base_sink = 700;
    rst_n = 1;
    #1 rst_n = 0; job_valid = 0; job = '0; core_afull = 0;
    // expected stream
    for (int b = 0; b < 20; b += NPU) begin
      int n;
      n = (20 - b > NPU) ? NPU : 20 - b;
      exp_q.push_back('{clr: 1, load: 0, pu: 0, widx: 0, sidx: 0, addr: 0, base: b});
      for (int r = 0; r < n; r++)
        for (int w = 0; w < W; w++)
          exp_q.push_back('{clr: 0, load: 1, pu: r, widx: w, sidx: 0,
                            addr: (1 << 19) + base_ref + (b + r) * W + w, base: b});
      for (int s = 0; s < 5; s++)
        for (int w = 0; w < W; w++)
          exp_q.push_back('{clr: 0, load: 0, pu: 0, widx: w, sidx: s,
                            addr: (1 << 19) + base_srch + s * W + w, base: b});
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    job.half = 1; job.ref_addr = 19'(base_ref); job.num_refs = 13'd20;
    job.srch_addr = 19'(base_srch); job.num_srch = 21'd5; job.sink_addr = 19'(base_sink);
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    chk(!job_ready, "job not taken");
    // hang the input for a while during the first search phase
    wait (core_in.valid && !core_in.load);
    core_afull = 1;
    repeat (30) @(negedge clk);
    core_afull = 0;
    wait (job_done);
    @(negedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d expected events never happened", exp_q.size()));
    chk(n_clear == 3, "batch count");
    chk(job_results == 13, $sformatf("job_results %0d", job_results));
    chk(n_stall > 20 && n_stall_bad == 0, "input not hung while afull");
    for (int k = 0; k < 7; k++) begin
      logic [127:0] wexp;
      wexp[63:0]   = {32'hC0DE0000 | 2 * k, 32'(2 * k)};
      wexp[127:64] = (k == 6) ? 64'h0 : {32'hC0DE0000 | (2 * k + 1), 32'(2 * k + 1)};
      chk(u_mem.peek((1 << 19) + base_sink + k) == wexp, $sformatf("sink word %0d", k));
    end
    chk(u_mem.peek((1 << 19) + base_sink + 7) == u_mem.init_word((1 << 19) + base_sink + 7),
        "write past the last sink word");
    // empty job
    n_words = 0;
    job.num_refs = '0;
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    wait (job_done);
    @(negedge clk);
    chk(n_words == 0 && job_results == 0, "empty job read data or produced results");
    chk(job_ready, "not ready after the jobs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
