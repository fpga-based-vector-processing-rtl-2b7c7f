// vector_regfile: the banked vector register file at the centre of the vector unit.
//
// Eight vector registers of VLEN 32-bit elements are spread over LANES (eight) banks:
// element e of register v lives in bank e mod 8 at row v*(VLEN/8) + e/8, exactly the
// interleaving of the published bank diagram. Each bank has two read ports and one
// write port, so one vector instruction can read two source operands and write one
// result for eight elements per clock. Ports are given per bank as arrays; reads are
// combinational and writes happen at the clock edge. The bank count, port count and
// element layout follow the original design; combinational reads are this design's choice.
module vector_regfile #(
  parameter int unsigned NVREG = 8,
  parameter int unsigned VLEN  = 32,
  parameter int unsigned LANES = 8,
  parameter int unsigned AW    = $clog2(NVREG * VLEN / LANES)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra0 [LANES],
  output logic [31:0]   rd0 [LANES],
  input  logic [AW-1:0] ra1 [LANES],
  output logic [31:0]   rd1 [LANES],
  input  logic          we  [LANES],
  input  logic [AW-1:0] wa  [LANES],
  input  logic [31:0]   wd  [LANES]
);
  for (genvar b = 0; b < LANES; b++) begin : g_bank
    vrf_bank #(.NVREG(NVREG), .VLEN(VLEN), .LANES(LANES)) u_bank (
      .clk, .ra0(ra0[b]), .rd0(rd0[b]), .ra1(ra1[b]), .rd1(rd1[b]),
      .we(we[b]), .wa(wa[b]), .wd(wd[b])
    );
  end
endmodule
