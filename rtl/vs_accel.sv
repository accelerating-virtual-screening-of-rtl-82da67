// Virtual screening accelerator: top level of one FPGA.
//
// Compares every reference fingerprint with every search fingerprint using
// the Tanimoto measure and returns the pairs that pass a host-set threshold.
// The control block streams 128-bit words from the source SRAM port into
// the Processing Core, one word per clock; the core compares each search
// fingerprint with N_PU (128) stored reference fingerprints in parallel; the
// Hierarchical Elastic Memory merges the N_PU/8 core output FIFOs; the
// control block writes the merged records to the sink SRAM port.
//
// FP_TYPE selects the build. FP_BINARY (default): 1024-bit fingerprints,
// 8 words each, Octal Cores with a Primary Processing Unit; cfg writes the
// CMPR RAM threshold table (word c = floor(c*(2-D)/(1-D))). FP_PHARMA:
// 1792-bit pharmacophore fingerprints, 14 words each; cfg writes the Eq. 7
// coefficient D*2^17. Only the Processing Core differs between the builds,
// as in the published design; making it a parameter of one top is this
// design's choice.
//
// Interface: a job is accepted when job_valid and job_ready are both high;
// job_done pulses when its last record is in the sink memory, job_results
// holding the record count. The source port takes one read request per
// cycle (src_rd_req, src_rd_addr) and returns data in order on
// src_rd_valid/src_rd_data after any latency. The sink port takes one
// 128-bit write per cycle. stalled is high while the input is hung because
// an output FIFO is nearly full; overflow is a sticky error flag that must
// stay low.
module vs_accel
  import vs_pkg::*;
#(
  parameter fp_type_e    FP_TYPE      = FP_BINARY,
  parameter int unsigned N_PU         = 128,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned AFULL_MARGIN = 128,
  parameter int unsigned TAG_DEPTH    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              job_valid,
  output logic              job_ready,
  input  job_t              job,
  output logic              job_done,
  output logic [31:0]       job_results,
  input  cfg_t              cfg,
  output logic              src_rd_req,
  output logic [ADDR_W-1:0] src_rd_addr,
  input  logic              src_rd_valid,
  input  logic [WORD_W-1:0] src_rd_data,
  output logic              snk_wr_en,
  output logic [ADDR_W-1:0] snk_wr_addr,
  output logic [WORD_W-1:0] snk_wr_data,
  output logic              stalled,
  output logic              overflow
);
  localparam int unsigned W    = (FP_TYPE == FP_BINARY) ? BIN_WORDS : PH_WORDS;
  localparam int unsigned N_OC = N_PU / 8;
  localparam int unsigned FCW  = $clog2(FIFO_DEPTH + 1);

  fp_word_t             core_in;
  logic                 clear;
  logic [REF_IDX_W-1:0] ref_base;
  logic                 core_afull, core_busy, core_fifo_busy, hem_busy;
  logic [N_OC-1:0]      oc_pop, oc_empty;
  result_t              oc_dout  [N_OC];
  logic [FCW-1:0]       oc_count [N_OC];
  logic [RES_W-1:0]     oc_data  [N_OC];
  logic                 res_valid, res_pop;
  logic [RES_W-1:0]     res_data;

  control #(.N_PU(N_PU), .W(W), .TAG_DEPTH(TAG_DEPTH)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .job_valid      (job_valid),
    .job_ready      (job_ready),
    .job            (job),
    .job_done       (job_done),
    .job_results    (job_results),
    .rd_req         (src_rd_req),
    .rd_addr        (src_rd_addr),
    .rd_valid       (src_rd_valid),
    .rd_data        (src_rd_data),
    .core_in        (core_in),
    .clear          (clear),
    .ref_base       (ref_base),
    .core_afull     (core_afull),
    .core_busy      (core_busy),
    .core_fifo_busy (core_fifo_busy),
    .hem_busy       (hem_busy),
    .res_valid      (res_valid),
    .res_data       (res_data),
    .res_pop        (res_pop),
    .wr_en          (snk_wr_en),
    .wr_addr        (snk_wr_addr),
    .wr_data        (snk_wr_data),
    .stalled        (stalled)
  );

  if (FP_TYPE == FP_BINARY) begin : g_bin
    bin_core #(.N_PU(N_PU), .FIFO_DEPTH(FIFO_DEPTH), .AFULL_MARGIN(AFULL_MARGIN)) u_core (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (clear),
      .in         (core_in),
      .ref_base   (ref_base),
      .cfg        (cfg),
      .fifo_rd_en (oc_pop),
      .fifo_dout  (oc_dout),
      .fifo_empty (oc_empty),
      .fifo_count (oc_count),
      .afull      (core_afull),
      .busy       (core_busy),
      .fifo_busy  (core_fifo_busy),
      .overflow   (overflow)
    );
  end else begin : g_ph
    ph_core #(.N_PU(N_PU), .FIFO_DEPTH(FIFO_DEPTH), .AFULL_MARGIN(AFULL_MARGIN)) u_core (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (clear),
      .in         (core_in),
      .ref_base   (ref_base),
      .cfg        (cfg),
      .fifo_rd_en (oc_pop),
      .fifo_dout  (oc_dout),
      .fifo_empty (oc_empty),
      .fifo_count (oc_count),
      .afull      (core_afull),
      .busy       (core_busy),
      .fifo_busy  (core_fifo_busy),
      .overflow   (overflow)
    );
  end

  for (genvar k = 0; k < N_OC; k++) begin : g_cast
    assign oc_data[k] = oc_dout[k];
  end

  hem #(.N_IN(N_OC), .WIDTH(RES_W), .DEPTH(FIFO_DEPTH)) u_hem (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (~oc_empty),
    .in_data   (oc_data),
    .in_count  (oc_count),
    .in_pop    (oc_pop),
    .out_valid (res_valid),
    .out_data  (res_data),
    .out_pop   (res_pop),
    .busy      (hem_busy)
  );
endmodule
