// CMPR RAM: threshold table of the binary Octal Core.
//
// Word c holds floor(c * (2 - Dlimit) / (1 - Dlimit)), written by the host
// before screening (saturated to the word width). A pair is accepted when
// a + b is larger than the word addressed by its common bit count c, which
// replaces the division of the Tanimoto dissimilarity test by a table
// lookup and a compare. One write port (host) and one read port with a
// registered output: rdata is the word at raddr one cycle later. The
// rounding rule and word width are this design's; the table idea is the
// published one.
module cmpr_ram #(
  parameter int unsigned DEPTH = 1025,
  parameter int unsigned DW    = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
