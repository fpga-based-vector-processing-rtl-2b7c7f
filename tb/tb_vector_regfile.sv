// tb_vector_regfile: writes whole vector registers through the eight bank write ports,
// eight elements per clock, and reads them back through both read ports, checking the
// element-to-bank interleave (element e of register v in bank e%8, row v*4 + e/8).
module tb_vector_regfile;
  localparam int LANES = 8, VLEN = 32, NVREG = 8, RPR = VLEN / LANES;
  logic clk = 0;
  logic [4:0] ra0 [LANES], ra1 [LANES], wa [LANES];
  logic [31:0] rd0 [LANES], rd1 [LANES], wd [LANES];
  logic we [LANES];
  logic [31:0] vreg [NVREG][VLEN];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  vector_regfile dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (we[k]) begin we[k] = 0; ra0[k] = 0; ra1[k] = 0; wa[k] = 0; wd[k] = 0; end
    for (int v = 0; v < NVREG; v++)
      for (int g = 0; g < RPR; g++) begin
        @(negedge clk);
        for (int k = 0; k < LANES; k++) begin
          vreg[v][g * LANES + k] = $urandom;
          we[k] = 1; wa[k] = 5'(v * RPR + g); wd[k] = vreg[v][g * LANES + k];
        end
      end
    @(negedge clk) foreach (we[k]) we[k] = 0;
    for (int n = 0; n < 500; n++) begin
      int va, vb, g;
      va = $urandom_range(0, 7); vb = $urandom_range(0, 7); g = $urandom_range(0, RPR - 1);
      for (int k = 0; k < LANES; k++) begin
        ra0[k] = 5'(va * RPR + g);
        ra1[k] = 5'(vb * RPR + g);
      end
      #1;
      for (int k = 0; k < LANES; k++) begin
        checks += 2;
        if (rd0[k] !== vreg[va][g * LANES + k]) failures++;
        if (rd1[k] !== vreg[vb][g * LANES + k]) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
