// Behavioural model of one 128-bit SRAM port pair as seen by the
// accelerator: a read port that returns data in order after a random
// latency of MIN_LAT..MAX_LAT cycles, and a write port taking one word per
// cycle. Contents live in an associative array; unwritten words read as
// init_word(addr), a fixed function of the address, so testbenches know the
// data without loading it. Testbench use only.
module sram_model #(
  parameter int unsigned ADDR_W  = 20,
  parameter int unsigned MIN_LAT = 2,
  parameter int unsigned MAX_LAT = 6
) (
  input  logic              clk,
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output logic [127:0]      rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [127:0]      wr_data
);
  logic [127:0] mem [int unsigned];
  longint       cyc = 0;
  longint       q_t [$];
  int unsigned  q_a [$];
  longint       last_t = 0;

  function automatic logic [127:0] init_word(int unsigned a);
    return {a, ~a, a ^ 32'h5a5a_1234, a * 32'd2654435761};
  endfunction

  function automatic logic [127:0] peek(int unsigned a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  task automatic poke(int unsigned a, logic [127:0] d);
    mem[a] = d;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_valid <= 1'b0;
    if (q_t.size() > 0 && q_t[0] <= cyc) begin
      rd_valid <= 1'b1;
      rd_data  <= peek(q_a[0]);
      void'(q_t.pop_front());
      void'(q_a.pop_front());
    end
    if (rd_req) begin
      longint t;
      t = cyc + longint'($urandom_range(MIN_LAT, MAX_LAT));
      if (t < last_t) t = last_t;      // keep order
      last_t = t;
      q_t.push_back(t);
      q_a.push_back(int'(rd_addr));
    end
    if (wr_en) mem[int'(wr_addr)] = wr_data;
  end

  initial rd_valid = 1'b0;
endmodule
