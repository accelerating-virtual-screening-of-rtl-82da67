// Primary Processing Unit (PPU) of the binary Processing Core.
//
// Counts the '1' bits of every fingerprint on the input stream with the same
// CNT1 + accumulator pipeline as a Processing Unit, so its result lines up
// in time with the PUs' results. For a reference fingerprint (Step 1) the
// count is a and out_pu names the PU that stores it; for a search
// fingerprint (Step 2) it is b, which all PUs use together with their c.
// It stores no fingerprint itself.
//
// Timing: out_valid pulses 2+LAT (8) cycles after the last word of a
// fingerprint, with out_load, out_pu and out_sidx copied from that word's
// tag. Words may arrive with gaps.
module ppu
  import vs_pkg::*;
#(
  parameter int unsigned W = BIN_WORDS,
  localparam int unsigned C_W = $clog2(W * WORD_W + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  fp_word_t              in,
  output logic                  out_valid,
  output logic                  out_load,
  output logic [PU_IDX_W-1:0]   out_pu,
  output logic [SRCH_IDX_W-1:0] out_sidx,
  output logic [C_W-1:0]        out_cnt,
  output logic                  busy
);
  localparam int unsigned LAT   = cnt1_lat(WORD_W, 7);
  localparam int unsigned CNT_W = $clog2(WORD_W + 1);

  typedef struct packed {
    logic                  valid;
    logic                  load;
    logic                  first;
    logic                  last;
    logic [PU_IDX_W-1:0]   pu;
    logic [SRCH_IDX_W-1:0] sidx;
  } tag_t;

  logic [WORD_W-1:0] din_q;
  logic [CNT_W-1:0]  cnt;
  tag_t              tag_d [LAT+1];

  always_ff @(posedge clk) din_q <= in.data;

  cnt1 #(.N(WORD_W), .K(7)) u_cnt1 (.clk(clk), .din(din_q), .cnt(cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= LAT; i++) tag_d[i] <= '0;
    end else begin
      tag_d[0] <= '{valid: in.valid, load: in.load, first: in.widx == '0,
                    last: in.last, pu: in.pu, sidx: in.sidx};
      for (int i = 1; i <= LAT; i++) tag_d[i] <= tag_d[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_load  <= 1'b0;
      out_pu    <= '0;
      out_sidx  <= '0;
      out_cnt   <= '0;
    end else begin
      out_valid <= tag_d[LAT].valid && tag_d[LAT].last;
      if (tag_d[LAT].valid) begin
        out_cnt  <= (tag_d[LAT].first ? '0 : out_cnt) + C_W'(cnt);
        out_load <= tag_d[LAT].load;
        out_pu   <= tag_d[LAT].pu;
        out_sidx <= tag_d[LAT].sidx;
      end
    end
  end

  always_comb begin
    busy = out_valid;
    for (int i = 0; i <= LAT; i++) busy |= tag_d[i].valid;
  end
endmodule
