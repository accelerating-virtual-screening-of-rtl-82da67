// Pharmacophore Processing Unit.
//
// Holds one 1792-bit pharmacophore reference fingerprint (W = 14 words of
// sixteen 8-bit histogram bins) in an addressable shift register. For every
// search word it compares each bin with the reference bin at the same
// position; a comparator drives a multiplexer that picks the smaller and the
// larger of the two (CMPR MUX). Two adder trees sum the 16 minima and the 16
// maxima, and two accumulators add the W partial sums, giving sum(min) and
// sum(max) of the Tanimoto expression for pharmacophore fingerprints.
//
// Timing: CMPR MUX registered (1 cycle), adder trees one register per level
// (4 cycles), accumulators (1 cycle): s_valid pulses 6 cycles after the last
// word of a search fingerprint. Reference words with load_sel high are
// shifted in; the last of them marks the unit loaded, clear empties it. The
// structure follows the published PU; the register placement is this
// design's.
module ph_pu
  import vs_pkg::*;
#(
  parameter int unsigned W = PH_WORDS,
  localparam int unsigned S_W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  fp_word_t       in,
  input  logic           load_sel,
  output logic           s_valid,
  output logic [S_W-1:0] sum_min,
  output logic [S_W-1:0] sum_max,
  output logic           loaded,
  output logic           busy
);
  localparam int unsigned NB = WORD_W / 8;           // bins per word
  localparam int unsigned TL = $clog2(NB);           // adder tree latency
  localparam int unsigned TW = 8 + TL;
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } tag_t;

  logic [WORD_W-1:0]       ref_word;
  logic [NB-1:0][7:0]      mn, mx;
  logic [TW-1:0]           t_min, t_max;
  tag_t                    tag_d [TL+1];

  srl_reg #(.WIDTH(WORD_W), .DEPTH(W)) u_srl (
    .clk   (clk),
    .shift (in.valid && in.load && load_sel),
    .din   (in.data),
    .addr  (AW'(W - 1) - AW'(in.widx)),
    .dout  (ref_word)
  );

  // CMPR MUX
  always_ff @(posedge clk) begin
    for (int i = 0; i < NB; i++) begin
      logic [7:0] r, s;
      r = ref_word[8*i +: 8];
      s = in.data[8*i +: 8];
      if (r < s) begin
        mn[i] <= r;
        mx[i] <= s;
      end else begin
        mn[i] <= s;
        mx[i] <= r;
      end
    end
  end

  adder_tree #(.N(NB), .IN_W(8)) u_tmin (.clk(clk), .din(mn), .sum(t_min));
  adder_tree #(.N(NB), .IN_W(8)) u_tmax (.clk(clk), .din(mx), .sum(t_max));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= TL; i++) tag_d[i] <= '0;
    end else begin
      tag_d[0] <= '{valid: in.valid && !in.load, first: in.widx == '0, last: in.last};
      for (int i = 1; i <= TL; i++) tag_d[i] <= tag_d[i-1];
    end
  end

  // Accumulators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      sum_min <= '0;
      sum_max <= '0;
    end else begin
      s_valid <= tag_d[TL].valid && tag_d[TL].last;
      if (tag_d[TL].valid) begin
        sum_min <= (tag_d[TL].first ? '0 : sum_min) + S_W'(t_min);
        sum_max <= (tag_d[TL].first ? '0 : sum_max) + S_W'(t_max);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                         loaded <= 1'b0;
    else if (clear)                                     loaded <= 1'b0;
    else if (in.valid && in.load && load_sel && in.last) loaded <= 1'b1;
  end

  always_comb begin
    busy = s_valid;
    for (int i = 0; i <= TL; i++) busy |= tag_d[i].valid;
  end
endmodule
