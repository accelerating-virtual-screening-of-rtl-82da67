// PRI PTR: two-input priority selector of the Hierarchical Elastic Memory.
//
// Every cycle in which its own FIFO is not full, moves one word from one of
// its two input FIFOs into it. When both inputs hold data, the one whose
// FIFO reports the larger fill level wins, so the fuller FIFO drains first
// and no producer below runs full while another idles; on equal levels the
// input not served last time wins. in_pop and out_we are combinational in
// the same cycle (first-word-fall-through inputs). The level-based priority
// is the published rule; the tie-break is this design's.
module pri_ptr #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned CW    = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       in_valid,
  input  logic [WIDTH-1:0] in_data  [2],
  input  logic [CW-1:0]    in_count [2],
  output logic [1:0]       in_pop,
  input  logic             out_full,
  output logic             out_we,
  output logic [WIDTH-1:0] out_data
);
  logic sel, last_sel;

  always_comb begin
    if (in_valid == 2'b11) begin
      if (in_count[0] > in_count[1])      sel = 1'b0;
      else if (in_count[1] > in_count[0]) sel = 1'b1;
      else                                sel = !last_sel;
    end else begin
      sel = in_valid[1];
    end
    out_we   = (|in_valid) && !out_full;
    out_data = in_data[sel];
    in_pop   = out_we ? (sel ? 2'b10 : 2'b01) : 2'b00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_sel <= 1'b1;
    else if (out_we) last_sel <= sel;
  end
endmodule
