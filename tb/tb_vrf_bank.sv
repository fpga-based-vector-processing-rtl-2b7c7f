// tb_vrf_bank: one register bank (32 rows) written and read on both read ports at
// random, compared with a model; a read of the row being written gives the old value.
module tb_vrf_bank;
  logic clk = 0, we = 0;
  logic [4:0] ra0 = 0, ra1 = 0, wa = 0;
  logic [31:0] rd0, rd1, wd = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  vrf_bank dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      model[i] = $urandom;
      @(negedge clk) begin we = 1; wa = 5'(i); wd = model[i]; end
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra0 = 5'($urandom); ra1 = (n % 4 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd0 !== model[ra0]) failures++;
      if (rd1 !== model[ra1]) failures++;
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
