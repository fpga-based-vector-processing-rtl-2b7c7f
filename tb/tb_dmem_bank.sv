// tb_dmem_bank: random reads and writes on both ports of a data memory bank against a
// model array; reads return one clock later, a write reads the old word first.
module tb_dmem_bank;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [8:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [512];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dmem_bank dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      model[i] = $urandom;
      @(negedge clk) begin b_en = 1; b_we = 1; b_addr = 9'(i); b_wdata = model[i]; end
    end
    @(negedge clk) begin b_en = 0; b_we = 0; end
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] ea, eb;
      logic ra, rb;
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 9'($urandom); a_wdata = $urandom;
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 9'($urandom); b_wdata = $urandom;
      if (a_addr == b_addr) b_en = 0;           // no same-address collisions
      ra = a_en; rb = b_en;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata !== ea) failures++; end
      if (rb) begin checks++; if (b_rdata !== eb) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
