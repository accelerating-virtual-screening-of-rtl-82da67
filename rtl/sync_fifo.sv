// Synchronous FIFO with first-word-fall-through output and a fill level.
//
// Used at the output of every Octal Core (64 bits x 1024 words) and in every
// node of the Hierarchical Elastic Memory, whose selectors compare the fill
// levels. Storage is a memory with one write port and one registered read
// port (a block RAM); an output register holds the word at the head, so dout
// is valid whenever empty is low and rd_en pops it. A word written at cycle
// t can be read from t+2. count is the number of words held (memory plus
// output register); full is count == DEPTH, and a write while full is
// dropped (users must not do it; an assertion reports it).
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned CW  = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    mem_cnt;     // words in mem, not yet in the output register
  logic             out_valid;
  logic             do_wr, do_pop, do_load;

  assign count  = mem_cnt + CW'(out_valid);
  assign full   = (count == CW'(DEPTH));
  assign empty  = !out_valid;
  assign do_wr  = wr_en && !full;
  assign do_pop = rd_en && out_valid;
  assign do_load = (mem_cnt != '0) && (!out_valid || do_pop);

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
    if (do_load) dout <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      mem_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_load) rd_ptr <= incr(rd_ptr);
      mem_cnt <= mem_cnt + CW'(do_wr) - CW'(do_load);
      if (do_load) out_valid <= 1'b1;
      else if (do_pop) out_valid <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write while full");
endmodule
