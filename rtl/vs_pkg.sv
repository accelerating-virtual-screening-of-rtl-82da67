// Shared types and constants of the fingerprint screening accelerator.
//
// The datapath takes one 128-bit word per clock. A binary fingerprint is
// 1024 bits (8 words); a pharmacophore fingerprint is 1680 bits padded with
// zeros to 1792 bits (14 words). Every word travelling from the control block
// to the Processing Core carries a tag (fp_word_t) telling whether it belongs
// to a reference fingerprint being loaded (Step 1) or to a search fingerprint
// being compared (Step 2), its word position and the fingerprint's index.
// Accepted pairs leave the core as 64-bit records (result_t). The widths of
// the record fields and of the configuration bus are choices of this design.
package vs_pkg;

  localparam int unsigned WORD_W     = 128;  // memory interface width
  localparam int unsigned BIN_WORDS  = 8;    // 1024-bit binary fingerprint
  localparam int unsigned PH_WORDS   = 14;   // 1792-bit pharmacophore fingerprint
  localparam int unsigned WIDX_W     = 4;    // word position within a fingerprint
  localparam int unsigned PU_IDX_W   = 8;    // selects one of up to 256 PUs
  localparam int unsigned REF_IDX_W  = 12;   // reference index in a job
  localparam int unsigned SRCH_IDX_W = 20;   // search index in a job
  localparam int unsigned RES_W      = 64;   // output record width
  localparam int unsigned CFG_ADDR_W = 11;
  localparam int unsigned CFG_DATA_W = 18;
  localparam int unsigned PH_FRAC_W  = 17;   // fraction bits of the Eq. 7 coefficient
  localparam int unsigned ADDR_W     = 20;   // SRAM word address (two halves)

  typedef enum logic [0:0] {
    FP_BINARY = 1'b0,
    FP_PHARMA = 1'b1
  } fp_type_e;

  // One tagged input word.
  typedef struct packed {
    logic                  valid;
    logic                  load;   // 1: reference word (Step 1), 0: search word (Step 2)
    logic [PU_IDX_W-1:0]   pu;     // Step 1: PU that stores this reference
    logic [WIDX_W-1:0]     widx;   // word position, 0 first
    logic                  last;   // last word of the fingerprint
    logic [SRCH_IDX_W-1:0] sidx;   // Step 2: search fingerprint index
    logic [WORD_W-1:0]     data;
  } fp_word_t;

  // Accepted pair. Binary: hi = a+b, lo = c. Pharmacophore: hi = sum(max), lo = sum(min).
  typedef struct packed {
    logic [REF_IDX_W-1:0]  ref_idx;
    logic [SRCH_IDX_W-1:0] srch_idx;
    logic [15:0]           hi;
    logic [15:0]           lo;
  } result_t;

  // Host configuration write: binary builds write CMPR RAM word addr,
  // pharmacophore builds write the Eq. 7 coefficient (addr ignored).
  typedef struct packed {
    logic                  we;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_t;

  // Screening job handed over by the host.
  typedef struct packed {
    logic        half;       // which half of the double-buffered memories
    logic [ADDR_W-2:0] ref_addr;   // first word of the reference fingerprints
    logic [REF_IDX_W:0]  num_refs;
    logic [ADDR_W-2:0] srch_addr;  // first word of the search fingerprints
    logic [SRCH_IDX_W:0] num_srch;
    logic [ADDR_W-2:0] sink_addr;  // first word of the result area
  } job_t;

  // Pipeline depth of the ones counter: one summarizer stage plus one stage
  // per level of the two-input adder tree.
  function automatic int unsigned cnt1_lat(int unsigned n, int unsigned k);
    return 1 + $clog2((n + k - 1) / k);
  endfunction

endpackage
