// tb_scalar_regfile: random register traffic against a model (r0 stays zero, a write is
// visible to a read in the same clock), plus VLR clamping to VLEN and VMR writes.
module tb_scalar_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] rd1, rd2, wd = 0, vwd = 0;
  logic we = 0, vlr_we = 0, vmr_we = 0;
  logic [0:0] vmr_sel = 0;
  logic [5:0] vlr;
  logic [31:0] vmr;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  scalar_regfile dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    #12 rst_n = 1;
    checks += 2;
    if (vlr !== 6'd32) failures++;
    if (vmr !== '1) failures++;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] e1, e2;
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = $urandom;
      ra1 = 4'($urandom); ra2 = (n % 3 == 0) ? wa : 4'($urandom);
      vlr_we = ($urandom_range(0, 3) == 0); vmr_we = ($urandom_range(0, 3) == 0);
      vwd = (n % 2 == 0) ? 32'($urandom_range(0, 40)) : $urandom;
      #1;
      e1 = (ra1 == 0) ? 0 : (we && wa == ra1) ? wd : model[ra1];
      e2 = (ra2 == 0) ? 0 : (we && wa == ra2) ? wd : model[ra2];
      checks += 2;
      if (rd1 !== e1) failures++;
      if (rd2 !== e2) failures++;
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
      if (vlr_we) begin checks++; if (vlr !== ((vwd > 32) ? 6'd32 : 6'(vwd))) failures++; end
      if (vmr_we) begin checks++; if (vmr !== vwd) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
