// Processing Core for pharmacophore fingerprints.
//
// N_PU pharmacophore Processing Units (128 with the defaults) in groups of
// eight, all fed with the same tagged 128-bit word per cycle. In Step 1 the
// reference words are shifted into the PU named by each word's tag; in
// Step 2 every search fingerprint (14 words) is compared with all stored
// references at once. No Primary Processing Unit is needed: the minima and
// maxima are formed inside each PU. Each group writes its accepted pairs
// into its own FIFO; those FIFOs' read ports are the outputs, one per group,
// for the Hierarchical Elastic Memory. Status outputs as in the binary core.
module ph_core
  import vs_pkg::*;
#(
  parameter int unsigned N_PU         = 128,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned AFULL_MARGIN = 128,
  localparam int unsigned N_OC = N_PU / 8,
  localparam int unsigned FCW  = $clog2(FIFO_DEPTH + 1)
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
  logic [N_OC-1:0] oc_afull, oc_busy, oc_ovf, oc_nz;

  for (genvar k = 0; k < N_OC; k++) begin : g_oc
    ph_octal_core #(
      .CORE_ID      (k),
      .N_PU         (8),
      .W            (PH_WORDS),
      .FIFO_DEPTH   (FIFO_DEPTH),
      .AFULL_MARGIN (AFULL_MARGIN)
    ) u_oc (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (clear),
      .in         (in),
      .ref_base   (ref_base),
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
  assign busy      = |oc_busy;
  assign fifo_busy = |oc_nz;
  assign overflow  = |oc_ovf;
endmodule
