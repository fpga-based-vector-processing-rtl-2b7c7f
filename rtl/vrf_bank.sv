// vrf_bank: one of the eight banks of the vector register file.
//
// A bank holds, for every vector register, the elements whose index is congruent to the
// bank number modulo eight: with VLEN elements per register it holds VLEN/8 rows per
// register, row address = {register, element / 8}. It has the two read ports and one
// write port of the published organisation; the FP adder, FP multiplier and memory
// interface take turns on them. Reads are combinational (distributed RAM), the write
// takes effect at the clock edge. A read of the row being written returns the old value.
module vrf_bank #(
  parameter int unsigned NVREG = 8,
  parameter int unsigned VLEN  = 32,
  parameter int unsigned LANES = 8,
  parameter int unsigned DEPTH = NVREG * VLEN / LANES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra0,
  output logic [31:0]   rd0,
  input  logic [AW-1:0] ra1,
  output logic [31:0]   rd1,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [31:0]   wd
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];
endmodule
