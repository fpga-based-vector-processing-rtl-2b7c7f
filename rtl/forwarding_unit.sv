// forwarding_unit: selects the operand sources of the execute stage.
//
// Combinational. For each of the two source registers of the instruction in execute it
// picks the newest value: the ALU result held in EX/MEM if that instruction writes the
// register (a load there has no data yet and is skipped), else the value being written
// back from MEM/WB, else the value read in decode. r0 is never forwarded. This is the
// forwarding unit of the original design's scalar pipeline drawing; the select encoding is
// this design's.
module forwarding_unit (
  input  logic [3:0] ex_rs,
  input  logic [3:0] ex_rt,
  input  logic       mem_wr,
  input  logic       mem_is_load,
  input  logic [3:0] mem_rd,
  input  logic       wb_wr,
  input  logic [3:0] wb_rd,
  output logic [1:0] sel_a,   // 0: decode value, 1: EX/MEM, 2: MEM/WB
  output logic [1:0] sel_b
);
  function automatic logic [1:0] pick(logic [3:0] r);
    if (r == 4'd0)                                  return 2'd0;
    else if (mem_wr && !mem_is_load && mem_rd == r) return 2'd1;
    else if (wb_wr && wb_rd == r)                   return 2'd2;
    else                                            return 2'd0;
  endfunction

  assign sel_a = pick(ex_rs);
  assign sel_b = pick(ex_rt);
endmodule
