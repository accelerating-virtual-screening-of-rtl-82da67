// Group of eight pharmacophore Processing Units with a shared threshold test.
//
// The eight PUs see the same input stream and finish a search fingerprint in
// the same cycle with sum(min) and sum(max) each. A single multiply-subtract
// unit, shaped like a DSP48 slice, then tests them one per cycle over the
// next eight cycles with Eq. 7 as published:
//   accept  when  Dlimit * sum(max) - sum(min) < 0,
// i.e. when the sign bit of the result is set. Dlimit is an unsigned fraction
// with PH_FRAC_W (17) fraction bits, written by the host through cfg (any
// address); sum(min) is shifted left by the same amount so no division or
// rounding of the sums is needed. Accepted pairs become result_t records
// {reference index, search index, sum(max), sum(min)} in a 64-bit x 1024-word
// FIFO whose read side is the group's output.
//
// Timing: PU results 6 cycles after the last word, then the shared unit's
// multiplier register and subtract/compare register: PU j's record reaches
// the FIFO 9 + j cycles after the last word. The 8 tests take 8 of the 14
// cycles a fingerprint needs to arrive. afull, busy and overflow as in the
// binary Octal Core. The eight-PU grouping with one shared multiply unit and
// FIFO is this design's choice, mirroring the binary Octal Core.
module ph_octal_core
  import vs_pkg::*;
#(
  parameter int unsigned CORE_ID      = 0,
  parameter int unsigned N_PU         = 8,
  parameter int unsigned W            = PH_WORDS,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned AFULL_MARGIN = 128,
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  fp_word_t             in,
  input  logic [REF_IDX_W-1:0] ref_base,
  input  cfg_t                 cfg,
  input  logic                 fifo_rd_en,
  output result_t              fifo_dout,
  output logic                 fifo_empty,
  output logic [FCW-1:0]       fifo_count,
  output logic                 afull,
  output logic                 busy,
  output logic                 overflow
);
  localparam int unsigned IW   = (N_PU > 1) ? $clog2(N_PU) : 1;
  localparam int unsigned BASE = CORE_ID * N_PU;
  localparam int unsigned PW   = CFG_DATA_W + 16;       // product width
  localparam int unsigned DW   = PW + 2;                // signed difference

  logic [N_PU-1:0] s_valid, loaded, pu_busy;
  logic [15:0]     smin [N_PU];
  logic [15:0]     smax [N_PU];

  for (genvar j = 0; j < N_PU; j++) begin : g_pu
    ph_pu #(.W(W)) u_pu (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .in       (in),
      .load_sel (in.pu == PU_IDX_W'(BASE + j)),
      .s_valid  (s_valid[j]),
      .sum_min  (smin[j]),
      .sum_max  (smax[j]),
      .loaded   (loaded[j]),
      .busy     (pu_busy[j])
    );
  end

  // Threshold coefficient Dlimit * 2^PH_FRAC_W.
  logic [CFG_DATA_W-1:0] coef;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      coef <= '0;
    else if (cfg.we) coef <= cfg.data;
  end

  // The search index travels beside the PU pipeline (6 cycles).
  localparam int unsigned PL = 1 + $clog2(WORD_W / 8) + 1;
  logic [SRCH_IDX_W-1:0] sidx_d [PL];
  always_ff @(posedge clk) begin
    sidx_d[0] <= in.sidx;
    for (int i = 1; i < PL; i++) sidx_d[i] <= sidx_d[i-1];
  end

  // Capture the sums of one search fingerprint and test them in turn.
  logic [15:0]           min_buf [N_PU];
  logic [15:0]           max_buf [N_PU];
  logic [SRCH_IDX_W-1:0] sidx_buf;
  logic                  seq_active;
  logic [IW-1:0]         seq_idx;

  always_ff @(posedge clk) begin
    if (s_valid[0]) begin
      for (int j = 0; j < N_PU; j++) begin
        min_buf[j] <= smin[j];
        max_buf[j] <= smax[j];
      end
      sidx_buf <= sidx_d[PL-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_active <= 1'b0;
      seq_idx    <= '0;
    end else if (s_valid[0]) begin
      seq_active <= 1'b1;
      seq_idx    <= '0;
    end else if (seq_active) begin
      seq_idx <= seq_idx + 1'b1;
      if (seq_idx == IW'(N_PU - 1)) seq_active <= 1'b0;
    end
  end

  // Stage 1: multiplier register. Stage 2: subtract, sign test.
  logic                  m_valid;
  logic [PW-1:0]         m_prod;
  logic [15:0]           m_min, m_max;
  logic [REF_IDX_W-1:0]  m_ref;
  logic [SRCH_IDX_W-1:0] m_sidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_valid <= 1'b0;
    else        m_valid <= seq_active && loaded[seq_idx];
  end

  always_ff @(posedge clk) begin
    m_prod <= PW'(coef) * PW'(max_buf[seq_idx]);
    m_min  <= min_buf[seq_idx];
    m_max  <= max_buf[seq_idx];
    m_ref  <= ref_base + REF_IDX_W'(BASE) + REF_IDX_W'(seq_idx);
    m_sidx <= sidx_buf;
  end

  logic signed [DW-1:0] diff;
  logic                 accept, fifo_full;
  result_t              rec;

  assign diff   = $signed({2'b00, m_prod}) - $signed(DW'({m_min, PH_FRAC_W'(0)}));
  assign accept = m_valid && diff[DW-1];
  assign rec    = '{ref_idx: m_ref, srch_idx: m_sidx, hi: m_max, lo: m_min};

  sync_fifo #(.WIDTH(RES_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (accept),
    .din   (rec),
    .rd_en (fifo_rd_en),
    .dout  (fifo_dout),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count (fifo_count)
  );

  assign afull = fifo_count > FCW'(FIFO_DEPTH - AFULL_MARGIN);
  assign busy  = (|pu_busy) || seq_active || m_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else if (accept && fifo_full) overflow <= 1'b1;
  end

  a_seq_free: assert property (@(posedge clk) disable iff (!rst_n)
      s_valid[0] |-> (!seq_active || seq_idx == IW'(N_PU - 1)))
    else $error("ph_octal_core: fingerprints closer than N_PU cycles");
endmodule
