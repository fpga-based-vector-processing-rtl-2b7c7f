// tb_forwarding_unit: random register numbers and write flags; the expected select is
// the newest writer (EX/MEM unless it is a load, then MEM/WB), never for r0.
module tb_forwarding_unit;
  logic [3:0] ex_rs, ex_rt, mem_rd, wb_rd;
  logic mem_wr, mem_is_load, wb_wr;
  logic [1:0] sel_a, sel_b;
  int checks = 0, failures = 0;

  forwarding_unit dut (.*);

  function automatic logic [1:0] model(logic [3:0] r);
    if (r == 0) return 0;
    if (mem_wr && !mem_is_load && mem_rd == r) return 1;
    if (wb_wr && wb_rd == r) return 2;
    return 0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits [3] = '{0, 0, 0};
    for (int n = 0; n < 3000; n++) begin
      ex_rs = 4'($urandom_range(0, 3)); ex_rt = 4'($urandom_range(0, 3));
      mem_rd = 4'($urandom_range(0, 3)); wb_rd = 4'($urandom_range(0, 3));
      mem_wr = 1'($urandom); wb_wr = 1'($urandom); mem_is_load = ($urandom_range(0, 3) == 0);
      #1;
      checks += 2;
      if (sel_a !== model(ex_rs)) failures++;
      if (sel_b !== model(ex_rt)) failures++;
      hits[sel_a]++;
    end
    checks++;
    if (hits[0] == 0 || hits[1] == 0 || hits[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
