// imem: instruction memory of the scalar unit, 256 words of 32 bits (one block RAM).
//
// Port A is the fetch port: the word at `addr` appears on `rdata` one clock after an
// edge with `en` high, and `rdata` holds while `en` is low, so the output register
// doubles as the instruction half of the IF/ID pipeline register and a pipeline stall
// simply drops `en`. Port B is the host write port used to download a program before
// the processor is started. Size follows the published 256x32 instruction memory; the
// two-port arrangement and the host port are this design's choice.
module imem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
  end
endmodule
