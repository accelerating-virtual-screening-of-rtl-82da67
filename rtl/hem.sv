// Hierarchical Elastic Memory (HEM).
//
// Merges the output FIFOs of the N_IN Octal Cores into one stream for the
// control block, balancing them so that none runs full. It is a binary tree:
// each node takes two inputs from the level below through a PRI PTR
// selector, which favours the input whose FIFO holds more data, and stores
// what it takes in its own 64-bit x 1024-word FIFO. With N_IN = 16 there are
// 8 + 4 + 2 + 1 = 15 nodes; the root FIFO's read side is the output.
//
// Nodes are numbered as a heap: node 1 is the root, node k takes nodes 2k
// and 2k+1, and numbers N_IN .. 2*N_IN-1 are the inputs. Each level adds two
// cycles of latency (FIFO write to first-word-fall-through output). An input
// is popped (in_pop) in the cycle its word is taken. busy is high while any
// node FIFO holds a word. N_IN must be a power of two, at least 2.
module hem
  import vs_pkg::*;
#(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned WIDTH = RES_W,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in_valid,
  input  logic [WIDTH-1:0] in_data  [N_IN],
  input  logic [CW-1:0]    in_count [N_IN],
  output logic [N_IN-1:0]  in_pop,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_pop,
  output logic             busy
);
  logic [2*N_IN-1:0] v, pop;
  logic [WIDTH-1:0]  d   [2*N_IN];
  logic [CW-1:0]     cnt [2*N_IN];
  logic [N_IN-1:0]   nz;

  for (genvar i = 0; i < N_IN; i++) begin : g_leaf
    assign v[N_IN+i]   = in_valid[i];
    assign d[N_IN+i]   = in_data[i];
    assign cnt[N_IN+i] = in_count[i];
    assign in_pop[i]   = pop[N_IN+i];
  end

  for (genvar k = 1; k < N_IN; k++) begin : g_node
    logic             we, full, empty;
    logic [WIDTH-1:0] wd;
    logic [1:0]       cpop;

    pri_ptr #(.WIDTH(WIDTH), .CW(CW)) u_sel (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid ({v[2*k+1], v[2*k]}),
      .in_data  ('{d[2*k], d[2*k+1]}),
      .in_count ('{cnt[2*k], cnt[2*k+1]}),
      .in_pop   (cpop),
      .out_full (full),
      .out_we   (we),
      .out_data (wd)
    );
    assign pop[2*k]   = cpop[0];
    assign pop[2*k+1] = cpop[1];

    sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .wr_en (we),
      .din   (wd),
      .rd_en (pop[k]),
      .dout  (d[k]),
      .empty (empty),
      .full  (full),
      .count (cnt[k])
    );
    assign v[k]  = !empty;
    assign nz[k] = cnt[k] != '0;
  end

  assign nz[0]     = 1'b0;
  assign v[0]      = 1'b0;
  assign pop[1]    = out_pop;
  assign pop[0]    = 1'b0;
  assign d[0]      = '0;
  assign cnt[0]    = '0;
  assign out_valid = v[1];
  assign out_data  = d[1];
  assign busy      = |nz;
endmodule
