// Binary Processing Unit (PU).
//
// Holds one reference fingerprint of W 128-bit words in an addressable
// shift register and, for every search fingerprint streamed past it, counts
// the bits set in both (c of the Tanimoto expression): the search word is
// ANDed with the reference word at the same position, the 128 AND outputs
// are counted by CNT1 and an accumulator adds the W partial counts. The
// unit also keeps the bit count a of its reference, delivered by the
// Primary Processing Unit once the reference has been loaded.
//
// Interface and timing: in is the tagged word stream shared by all PUs.
// A reference word with load_sel high is shifted in. A search word is read
// against the store in the same cycle, the AND result is registered, CNT1
// adds LAT = 6 cycles and the accumulator one more: c_valid pulses with the
// final c 2+LAT cycles after the last word of a search fingerprint. Words
// may arrive with gaps. a_we stores a_in and marks the unit loaded; clear
// empties it for the next batch. The structure (SRL, AND, CNT1, ACCU)
// follows the published PU; the registered AND stage is this design's.
module bin_pu
  import vs_pkg::*;
#(
  parameter int unsigned W = BIN_WORDS,
  localparam int unsigned C_W = $clog2(W * WORD_W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  fp_word_t       in,
  input  logic           load_sel,
  input  logic           a_we,
  input  logic [C_W-1:0] a_in,
  output logic           c_valid,
  output logic [C_W-1:0] c,
  output logic [C_W-1:0] a,
  output logic           loaded,
  output logic           busy
);
  localparam int unsigned LAT   = cnt1_lat(WORD_W, 7);
  localparam int unsigned CNT_W = $clog2(WORD_W + 1);
  localparam int unsigned AW    = (W > 1) ? $clog2(W) : 1;

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } tag_t;

  logic [WORD_W-1:0] ref_word, and_q;
  logic [CNT_W-1:0]  cnt;
  tag_t              tag_d [LAT+1];

  srl_reg #(.WIDTH(WORD_W), .DEPTH(W)) u_srl (
    .clk   (clk),
    .shift (in.valid && in.load && load_sel),
    .din   (in.data),
    .addr  (AW'(W - 1) - AW'(in.widx)),
    .dout  (ref_word)
  );

  always_ff @(posedge clk) and_q <= in.data & ref_word;

  cnt1 #(.N(WORD_W), .K(7)) u_cnt1 (.clk(clk), .din(and_q), .cnt(cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= LAT; i++) tag_d[i] <= '0;
    end else begin
      tag_d[0] <= '{valid: in.valid && !in.load, first: in.widx == '0, last: in.last};
      for (int i = 1; i <= LAT; i++) tag_d[i] <= tag_d[i-1];
    end
  end

  // Accumulator (ACCU)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c       <= '0;
      c_valid <= 1'b0;
    end else begin
      c_valid <= tag_d[LAT].valid && tag_d[LAT].last;
      if (tag_d[LAT].valid)
        c <= (tag_d[LAT].first ? '0 : c) + C_W'(cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a      <= '0;
      loaded <= 1'b0;
    end else if (clear) begin
      loaded <= 1'b0;
    end else if (a_we) begin
      a      <= a_in;
      loaded <= 1'b1;
    end
  end

  always_comb begin
    busy = c_valid;
    for (int i = 0; i <= LAT; i++) busy |= tag_d[i].valid;
  end
endmodule
