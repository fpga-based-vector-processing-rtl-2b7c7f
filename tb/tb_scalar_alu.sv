// tb_scalar_alu: random operands through every scalar ALU operation, compared with
// expressions computed here.
module tb_scalar_alu;
  import vp_pkg::*;
  sop_e op;
  logic [31:0] a, b, y;
  logic [4:0] shamt;
  logic eq;
  int checks = 0, failures = 0;

  scalar_alu dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sop_e ops [7] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_SLL, OP_MUL, OP_SLT};
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] exp;
      op = ops[n % 7];
      a = $urandom; b = (n % 5 == 0) ? a : $urandom; shamt = 5'($urandom);
      if (n % 3 == 0) begin a = a >> 16; b = b >> 16; end
      #1;
      case (op)
        OP_ADD: exp = a + b;
        OP_SUB: exp = a - b;
        OP_AND: exp = a & b;
        OP_OR:  exp = a | b;
        OP_SLL: exp = a << shamt;
        OP_MUL: exp = 32'(longint'($signed(a[15:0])) * longint'($signed(b[15:0])));
        default: exp = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      endcase
      checks += 2;
      if (y !== exp) begin failures++; $display("op %s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp); end
      if (eq !== (a == b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
