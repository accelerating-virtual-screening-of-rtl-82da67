// Pipelined adder tree.
//
// Sums N unsigned operands of IN_W bits with a tree of two-input adders,
// one register per tree level, so the sum of the operands presented in one
// cycle appears LAT = clog2(N) cycles later and a new set can enter every
// cycle. An odd operand at a level passes to the next level unchanged.
// It is the back end of the ones counter (CNT1) and the min/max summing
// tree of the pharmacophore Processing Unit. With N = 1 the tree is a wire.
module adder_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = IN_W + $clog2(N)
) (
  input  logic                    clk,
  input  logic [N-1:0][IN_W-1:0]  din,
  output logic [OUT_W-1:0]        sum
);
  localparam int unsigned L = $clog2(N);

  // Operand count at tree level l.
  function automatic int unsigned cnt_at(int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  logic [OUT_W-1:0] lvl [L+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign lvl[0][i] = OUT_W'(din[i]);
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < cnt_at(l); i++) begin : g_node
      if (2 * i + 1 < cnt_at(l - 1)) begin : g_add
        always_ff @(posedge clk) lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
      end else begin : g_pass
        always_ff @(posedge clk) lvl[l][i] <= lvl[l-1][2*i];
      end
    end
  end

  assign sum = lvl[L][0];
endmodule
