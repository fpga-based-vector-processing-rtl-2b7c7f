// dmem_bank: one data memory bank, 512 words of 32 bits, as one true dual-port block RAM.
//
// The processor has sixteen of these, two groups of eight. Port A belongs to the vector
// memory interface, port B to the host. Both ports read synchronously: `a_rdata`
// (`b_rdata`) shows the word addressed in the cycle before, when `a_en` (`b_en`) was
// high, and holds otherwise. A write returns the old contents (read-first). The bank
// size follows the published 512x32 bank; the host port is this design's choice, and
// the host is expected to use it only while the processor is idle.
module dmem_bank #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
