// Control block: sequences a screening job and moves data between the
// double-buffered SRAMs and the Processing Core.
//
// A job names which half of the source and sink memories it uses (the host
// fills and reads the other half meanwhile), where the reference and search
// fingerprints start, how many there are, and where results go. The block
// then repeats the three steps of the algorithm:
//   1. read the next N_PU reference fingerprints (W words each) and hand
//      them to the core, tagged with the PU that stores each one;
//   2. read the whole search database and hand it to the core, tagged with
//      each fingerprint's index;
//   3. wait until the core pipelines are empty; if references remain, go to 1.
// A job with no references ends at once; the last batch may be partial.
// Search reads are hung while core_afull is high, so no Octal Core FIFO
// overflows. Reads may return after any latency but in order; the tag of
// each outstanding read waits in a TAG_DEPTH-entry queue. In parallel,
// every record arriving at the HEM output is popped and two records are
// packed per 128-bit sink word (first record in the low half). After the
// last batch, once the core, its FIFOs and the HEM are empty, a half-filled
// word is written with a zero upper half, and job_done pulses with the
// number of records in job_results.
//
// The three-step loop, the 128-bit data path, the double buffering and the
// hanging of the input follow the published design; the job descriptor, the
// tag queue, the record packing and the waiting between batches are this
// design's choices.
module control
  import vs_pkg::*;
#(
  parameter int unsigned N_PU      = 128,
  parameter int unsigned W         = BIN_WORDS,
  parameter int unsigned TAG_DEPTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host
  input  logic                 job_valid,
  output logic                 job_ready,
  input  job_t                 job,
  output logic                 job_done,
  output logic [31:0]          job_results,
  // source memory
  output logic                 rd_req,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic                 rd_valid,
  input  logic [WORD_W-1:0]    rd_data,
  // Processing Core
  output fp_word_t             core_in,
  output logic                 clear,
  output logic [REF_IDX_W-1:0] ref_base,
  input  logic                 core_afull,
  input  logic                 core_busy,
  input  logic                 core_fifo_busy,
  input  logic                 hem_busy,
  // HEM output
  input  logic                 res_valid,
  input  logic [RES_W-1:0]     res_data,
  output logic                 res_pop,
  // sink memory
  output logic                 wr_en,
  output logic [ADDR_W-1:0]    wr_addr,
  output logic [WORD_W-1:0]    wr_data,
  // status
  output logic                 stalled
);
  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_LOAD, S_SEARCH, S_DRAIN, S_FINISH, S_FLUSH, S_DONE
  } state_e;

  typedef struct packed {
    logic                  load;
    logic [PU_IDX_W-1:0]   pu;
    logic [WIDX_W-1:0]     widx;
    logic                  last;
    logic [SRCH_IDX_W-1:0] sidx;
  } tag_t;

  localparam int unsigned TAW = $clog2(TAG_DEPTH);
  localparam int unsigned HAW = ADDR_W - 1;

  state_e               state;
  job_t                 jb;
  logic [REF_IDX_W:0]   batch_base, batch_n;
  logic [SRCH_IDX_W:0]  fp_cnt;
  logic [WIDX_W-1:0]    w_cnt;
  logic [HAW-1:0]       ref_ptr, srch_ptr;

  // ---------------- outstanding read tags ----------------
  tag_t                 tq [TAG_DEPTH];
  logic [TAW-1:0]       tq_wp, tq_rp;
  logic [TAW:0]         tq_cnt;
  logic                 issue, tq_pop;
  tag_t                 issue_tag;

  assign tq_pop = rd_valid;

  always_ff @(posedge clk) if (issue) tq[tq_wp] <= issue_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_wp  <= '0;
      tq_rp  <= '0;
      tq_cnt <= '0;
    end else begin
      if (issue)  tq_wp <= tq_wp + 1'b1;
      if (tq_pop) tq_rp <= tq_rp + 1'b1;
      tq_cnt <= tq_cnt + (TAW+1)'(issue) - (TAW+1)'(tq_pop);
    end
  end

  // Returned data goes to the core with its tag.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_in <= '0;
    end else begin
      core_in.valid <= rd_valid;
      core_in.load  <= tq[tq_rp].load;
      core_in.pu    <= tq[tq_rp].pu;
      core_in.widx  <= tq[tq_rp].widx;
      core_in.last  <= tq[tq_rp].last;
      core_in.sidx  <= tq[tq_rp].sidx;
      core_in.data  <= rd_data;
    end
  end

  // ---------------- read issue ----------------
  logic room, last_word, last_fp;
  assign room      = tq_cnt < (TAW+1)'(TAG_DEPTH);
  assign last_word = w_cnt == WIDX_W'(W - 1);
  assign last_fp   = (state == S_LOAD) ? (fp_cnt + 1'b1 == (SRCH_IDX_W+1)'(batch_n))
                                       : (fp_cnt + 1'b1 == jb.num_srch);
  assign stalled   = (state == S_SEARCH) && core_afull;
  assign issue     = room && ((state == S_LOAD) || (state == S_SEARCH && !core_afull));

  always_comb begin
    issue_tag      = '0;
    issue_tag.load = (state == S_LOAD);
    issue_tag.pu   = (state == S_LOAD) ? PU_IDX_W'(fp_cnt) : '0;
    issue_tag.widx = w_cnt;
    issue_tag.last = last_word;
    issue_tag.sidx = (state == S_LOAD) ? '0 : SRCH_IDX_W'(fp_cnt);
  end

  logic [REF_IDX_W:0] remaining;
  assign remaining = jb.num_refs - batch_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      jb         <= '0;
      batch_base <= '0;
      batch_n    <= '0;
      fp_cnt     <= '0;
      w_cnt      <= '0;
      ref_ptr    <= '0;
      srch_ptr   <= '0;
      rd_req     <= 1'b0;
      rd_addr    <= '0;
      clear      <= 1'b0;
    end else begin
      rd_req <= issue;
      clear  <= 1'b0;
      if (issue) rd_addr <= {jb.half, (state == S_LOAD) ? ref_ptr : srch_ptr};
      unique case (state)
        S_IDLE: if (job_valid) begin
          jb         <= job;
          batch_base <= '0;
          ref_ptr    <= job.ref_addr;
          state      <= (job.num_refs == '0) ? S_FINISH : S_CLEAR;
        end
        S_CLEAR: begin
          clear   <= 1'b1;
          batch_n <= (remaining > (REF_IDX_W+1)'(N_PU)) ? (REF_IDX_W+1)'(N_PU) : remaining;
          fp_cnt  <= '0;
          w_cnt   <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: if (issue) begin
          ref_ptr <= ref_ptr + 1'b1;
          w_cnt   <= last_word ? '0 : w_cnt + 1'b1;
          if (last_word) fp_cnt <= last_fp ? '0 : fp_cnt + 1'b1;
          if (last_word && last_fp) begin
            srch_ptr <= jb.srch_addr;
            state    <= (jb.num_srch == '0) ? S_DRAIN : S_SEARCH;
          end
        end
        S_SEARCH: if (issue) begin
          srch_ptr <= srch_ptr + 1'b1;
          w_cnt    <= last_word ? '0 : w_cnt + 1'b1;
          if (last_word) fp_cnt <= last_fp ? '0 : fp_cnt + 1'b1;
          if (last_word && last_fp) state <= S_DRAIN;
        end
        S_DRAIN: if (tq_cnt == '0 && !rd_req && !core_in.valid && !core_busy) begin
          batch_base <= batch_base + (REF_IDX_W+1)'(N_PU);
          state      <= (remaining > (REF_IDX_W+1)'(N_PU)) ? S_CLEAR : S_FINISH;
        end
        S_FINISH: if (tq_cnt == '0 && !core_in.valid && !core_busy && !core_fifo_busy
                      && !hem_busy && !res_valid) begin
          state <= S_FLUSH;
        end
        S_FLUSH: state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign job_ready = (state == S_IDLE);
  assign ref_base  = batch_base[REF_IDX_W-1:0];

  // ---------------- result writer ----------------
  logic              half_full;
  logic [RES_W-1:0]  lo_buf;
  logic [HAW-1:0]    wptr;

  assign res_pop = res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_full   <= 1'b0;
      lo_buf      <= '0;
      wptr        <= '0;
      wr_en       <= 1'b0;
      wr_addr     <= '0;
      wr_data     <= '0;
      job_results <= '0;
      job_done    <= 1'b0;
    end else begin
      wr_en    <= 1'b0;
      job_done <= 1'b0;
      if (state == S_IDLE && job_valid) begin
        half_full   <= 1'b0;
        wptr        <= job.sink_addr;
        job_results <= '0;
      end else if (res_valid) begin
        job_results <= job_results + 1'b1;
        if (!half_full) begin
          lo_buf    <= res_data;
          half_full <= 1'b1;
        end else begin
          wr_en     <= 1'b1;
          wr_addr   <= {jb.half, wptr};
          wr_data   <= {res_data, lo_buf};
          wptr      <= wptr + 1'b1;
          half_full <= 1'b0;
        end
      end else if (state == S_FLUSH && half_full) begin
        wr_en     <= 1'b1;
        wr_addr   <= {jb.half, wptr};
        wr_data   <= {RES_W'(0), lo_buf};
        wptr      <= wptr + 1'b1;
        half_full <= 1'b0;
      end
      if (state == S_DONE) job_done <= 1'b1;
    end
  end

  a_tq_bounds: assert property (@(posedge clk) disable iff (!rst_n)
      !(rd_valid && tq_cnt == '0))
    else $error("control: read data without an outstanding request");
endmodule
