// CNT1: pipelined counter of the '1' bits of an N-bit word.
//
// The first stage splits the word into groups of K bits (the last group
// padded with zeros) and counts each group in a small bit summarizer; the
// group counts are then added by a tree of two-input adders. Every stage is
// registered. With the defaults (N = 128, K = 7) the first stage has 19
// summarizers of 3-bit result and the adder tree has 5 levels, a 6-stage
// pipeline: the count of the word presented at cycle t is on cnt at t+6
// (LAT = vs_pkg::cnt1_lat(N, K)), one word per cycle. K = 7 and the six
// stages follow the published structure; registering each level is this
// design's reading of it.
module cnt1 #(
  parameter int unsigned N = 128,
  parameter int unsigned K = 7,
  localparam int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic [N-1:0]     din,
  output logic [CNT_W-1:0] cnt
);
  localparam int unsigned G    = (N + K - 1) / K;   // number of summarizers
  localparam int unsigned GC_W = $clog2(K + 1);     // width of one group count

  logic [G*K-1:0] padded;
  assign padded = (G*K)'(din);

  logic [G-1:0][GC_W-1:0] grp_cnt;

  for (genvar g = 0; g < G; g++) begin : g_sum
    always_ff @(posedge clk) begin
      logic [GC_W-1:0] s;
      s = '0;
      for (int unsigned b = 0; b < K; b++) s += GC_W'(padded[g*K + b]);
      grp_cnt[g] <= s;
    end
  end

  adder_tree #(.N(G), .IN_W(GC_W), .OUT_W(CNT_W)) u_tree (
    .clk (clk),
    .din (grp_cnt),
    .sum (cnt)
  );
endmodule
