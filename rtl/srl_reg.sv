// Reference fingerprint store: a WIDTH-bit wide, DEPTH-deep shift register
// with an addressable output, the structure of the FPGA's SRL primitives.
//
// While shift is high, din enters at position 0 and every word moves one
// position deeper. dout shows the word at position addr without a clock
// delay. After a fingerprint of DEPTH words has been shifted in first word
// first, word k sits at position DEPTH-1-k. Like the primitive, it has no
// reset; its users track whether it holds valid data.
module srl_reg #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (shift) begin
      sr[0] <= din;
      for (int unsigned i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[addr];
endmodule
