// scalar_alu: arithmetic logic unit of the scalar unit's execute stage.
//
// Combinational. Computes add, subtract, and, or, shift-left by an immediate, signed
// set-less-than and a signed 16x16->32 multiply (the original design's scalar unit has a 16-bit
// integer multiplier on a dedicated 18x18 multiplier block). It also gives the equality
// flag used by the branch decision. The operation set is this design's encoding of the
// "arithmetic operations" of the 16-instruction scalar ISA.
module scalar_alu
  import vp_pkg::*;
(
  input  sop_e        op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y,
  output logic        eq
);
  always_comb begin
    unique case (op)
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_SLL:  y = a << shamt;
      OP_MUL:  y = 32'($signed(a[15:0]) * $signed(b[15:0]));
      OP_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      default: y = a + b;   // ADD, ADDI, address of LW/SW
    endcase
  end
  assign eq = (a == b);
endmodule
