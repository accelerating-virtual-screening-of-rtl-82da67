// Processing Core for binary fingerprints.
//
// A Primary Processing Unit and N_PU/8 Octal Cores (128 Processing Units
// with the defaults) all take the same tagged 128-bit word per cycle. In
// Step 1 each reference word is shifted into the PU named by its tag and the
// PPU later delivers that reference's bit count a to the same PU. In Step 2
// every search word is compared with all stored references at once; the
// PPU supplies the search count b. Each Octal Core writes its accepted pairs
// into its own FIFO; the FIFO read ports are the core's outputs, one per
// Octal Core, for the Hierarchical Elastic Memory. afull is the OR of the
// Octal Cores' almost-full flags, busy covers every pipeline, fifo_busy any
// word left in an output FIFO.
module bin_core
  import vs_pkg::*;
#(
  parameter int unsigned N_PU         = 128,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned AFULL_MARGIN = 128,
  localparam int unsigned N_OC = N_PU / 8,
  localparam int unsigned FCW  = $clog2(FIFO_DEPTH + 1),
  localparam int unsigned C_W  = $clog2(BIN_WORDS * WORD_W + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  fp_word_t             in,
  input  logic [REF_IDX_W-1:0] ref_base,
  input  cfg_t                 cfg,
  input  logic    [N_OC-1:0]   fifo_rd_en,
  output result_t              fifo_dout  [N_OC],
  output logic    [N_OC-1:0]   fifo_empty,
  output logic    [FCW-1:0]    fifo_count [N_OC],
  output logic                 afull,
  output logic                 busy,
  output logic                 fifo_busy,
  output logic                 overflow
);
  logic                  p_valid, p_load, p_busy;
  logic [PU_IDX_W-1:0]   p_pu;
  logic [SRCH_IDX_W-1:0] p_sidx;
  logic [C_W-1:0]        p_cnt;
  logic [N_OC-1:0]       oc_afull, oc_busy, oc_ovf, oc_nz;

  ppu #(.W(BIN_WORDS)) u_ppu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in        (in),
    .out_valid (p_valid),
    .out_load  (p_load),
    .out_pu    (p_pu),
    .out_sidx  (p_sidx),
    .out_cnt   (p_cnt),
    .busy      (p_busy)
  );

  for (genvar k = 0; k < N_OC; k++) begin : g_oc
    octal_core #(
      .CORE_ID      (k),
      .N_PU         (8),
      .W            (BIN_WORDS),
      .FIFO_DEPTH   (FIFO_DEPTH),
      .AFULL_MARGIN (AFULL_MARGIN)
    ) u_oc (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (clear),
      .in         (in),
      .ref_base   (ref_base),
      .ppu_valid  (p_valid),
      .ppu_load   (p_load),
      .ppu_pu     (p_pu),
      .ppu_sidx   (p_sidx),
      .ppu_cnt    (p_cnt),
      .cfg        (cfg),
      .fifo_rd_en (fifo_rd_en[k]),
      .fifo_dout  (fifo_dout[k]),
      .fifo_empty (fifo_empty[k]),
      .fifo_count (fifo_count[k]),
      .afull      (oc_afull[k]),
      .busy       (oc_busy[k]),
      .overflow   (oc_ovf[k])
    );
    assign oc_nz[k] = fifo_count[k] != '0;
  end

  assign afull     = |oc_afull;
  assign busy      = p_busy || (|oc_busy);
  assign fifo_busy = |oc_nz;
  assign overflow  = |oc_ovf;
endmodule
