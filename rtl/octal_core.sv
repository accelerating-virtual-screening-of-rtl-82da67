// Octal Core of the binary Processing Core.
//
// Eight binary Processing Units see the same input stream. Each holds one
// reference fingerprint (PU number CORE_ID*8 + j in the whole core) and
// produces c for every search fingerprint; the counts of all eight appear in
// the same cycle, together with b from the Primary Processing Unit. They are
// then tested one per cycle over the next eight cycles by a single shared
// threshold table (CMPR RAM) and comparator: a pair is accepted when
// a + b > MEM[c] (Eq. 5 with the table of Eq. 8). Accepted pairs are written
// as result_t records {reference index, search index, a+b, c} into a
// 64-bit x 1024-word FIFO whose read side is the core's output.
//
// Timing: the shared comparator needs N_PU cycles per search fingerprint,
// which equals the W = 8 cycles a fingerprint takes to arrive, so the core
// keeps up with one input word per cycle. A record reaches the FIFO
// 11 + j cycles after the fingerprint's last word (PU j). afull rises when
// fewer than AFULL_MARGIN free words remain, telling the control block to
// hang the input; overflow is a sticky error flag. busy is high while any
// fingerprint is still in the PUs or the comparator. The sharing scheme
// follows the published Octal Core; record layout, afull and the
// pipeline registers are this design's.
module octal_core
  import vs_pkg::*;
#(
  parameter int unsigned CORE_ID      = 0,
  parameter int unsigned N_PU         = 8,
  parameter int unsigned W            = BIN_WORDS,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned AFULL_MARGIN = 128,
  localparam int unsigned C_W  = $clog2(W * WORD_W + 1),
  localparam int unsigned FCW  = $clog2(FIFO_DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  fp_word_t              in,
  input  logic [REF_IDX_W-1:0]  ref_base,
  input  logic                  ppu_valid,
  input  logic                  ppu_load,
  input  logic [PU_IDX_W-1:0]   ppu_pu,
  input  logic [SRCH_IDX_W-1:0] ppu_sidx,
  input  logic [C_W-1:0]        ppu_cnt,
  input  cfg_t                  cfg,
  input  logic                  fifo_rd_en,
  output result_t               fifo_dout,
  output logic                  fifo_empty,
  output logic [FCW-1:0]        fifo_count,
  output logic                  afull,
  output logic                  busy,
  output logic                  overflow
);
  localparam int unsigned TAB_DEPTH = W * WORD_W + 1;
  localparam int unsigned TAB_AW    = $clog2(TAB_DEPTH);
  localparam int unsigned TAB_DW    = C_W + 1;          // holds a+b
  localparam int unsigned IW        = (N_PU > 1) ? $clog2(N_PU) : 1;
  localparam int unsigned BASE      = CORE_ID * N_PU;

  logic [N_PU-1:0]  c_valid, loaded, pu_busy;
  logic [C_W-1:0]   c [N_PU];
  logic [C_W-1:0]   a [N_PU];

  for (genvar j = 0; j < N_PU; j++) begin : g_pu
    bin_pu #(.W(W)) u_pu (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .in       (in),
      .load_sel (in.pu == PU_IDX_W'(BASE + j)),
      .a_we     (ppu_valid && ppu_load && ppu_pu == PU_IDX_W'(BASE + j)),
      .a_in     (ppu_cnt),
      .c_valid  (c_valid[j]),
      .c        (c[j]),
      .a        (a[j]),
      .loaded   (loaded[j]),
      .busy     (pu_busy[j])
    );
  end

  // Capture the eight counts of one search fingerprint.
  logic [C_W-1:0]        c_buf [N_PU];
  logic [C_W-1:0]        b_buf;
  logic [SRCH_IDX_W-1:0] sidx_buf;
  logic                  seq_active;
  logic [IW-1:0]         seq_idx;

  always_ff @(posedge clk) begin
    if (c_valid[0]) begin
      for (int j = 0; j < N_PU; j++) c_buf[j] <= c[j];
      b_buf    <= ppu_cnt;
      sidx_buf <= ppu_sidx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_active <= 1'b0;
      seq_idx    <= '0;
    end else if (c_valid[0]) begin
      seq_active <= 1'b1;
      seq_idx    <= '0;
    end else if (seq_active) begin
      seq_idx <= seq_idx + 1'b1;
      if (seq_idx == IW'(N_PU - 1)) seq_active <= 1'b0;
    end
  end

  // Shared comparator, stage 1: table lookup with c, a+b formed alongside.
  logic [TAB_DW-1:0]     tab_q;
  logic                  s1_valid;
  logic [TAB_DW-1:0]     s1_ab;
  logic [C_W-1:0]        s1_c;
  logic [REF_IDX_W-1:0]  s1_ref;
  logic [SRCH_IDX_W-1:0] s1_sidx;

  cmpr_ram #(.DEPTH(TAB_DEPTH), .DW(TAB_DW)) u_tab (
    .clk   (clk),
    .we    (cfg.we),
    .waddr (TAB_AW'(cfg.addr)),
    .wdata (TAB_DW'(cfg.data)),
    .raddr (TAB_AW'(c_buf[seq_idx])),
    .rdata (tab_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= seq_active && loaded[seq_idx];
    end
  end

  always_ff @(posedge clk) begin
    s1_ab   <= TAB_DW'(a[seq_idx]) + TAB_DW'(b_buf);
    s1_c    <= c_buf[seq_idx];
    s1_ref  <= ref_base + REF_IDX_W'(BASE) + REF_IDX_W'(seq_idx);
    s1_sidx <= sidx_buf;
  end

  // Stage 2: compare and write accepted pairs.
  logic    accept, fifo_full;
  result_t rec;

  assign accept = s1_valid && (s1_ab > tab_q);
  assign rec    = '{ref_idx: s1_ref, srch_idx: s1_sidx, hi: 16'(s1_ab), lo: 16'(s1_c)};

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
  assign busy  = (|pu_busy) || seq_active || s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else if (accept && fifo_full) overflow <= 1'b1;
  end

  // A new fingerprint may only complete once the previous one has been tested.
  a_seq_free: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid[0] |-> (!seq_active || seq_idx == IW'(N_PU - 1)))
    else $error("octal_core: fingerprints closer than N_PU cycles");
  a_ppu_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid[0] |-> (ppu_valid && !ppu_load))
    else $error("octal_core: PPU count not aligned with PU counts");
endmodule
