// tb_imem: fills the instruction memory through the host port, then reads it back on
// the fetch port (one clock latency) and checks that the output holds while en is low.
module tb_imem;
  logic clk = 0, en = 0, host_we = 0;
  logic [7:0] addr = 0, host_addr = 0;
  logic [31:0] rdata, host_wdata = 0;
  logic [31:0] img [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  imem dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      img[i] = $urandom;
      @(negedge clk) begin host_we = 1; host_addr = 8'(i); host_wdata = img[i]; end
    end
    @(negedge clk) host_we = 0;
    for (int n = 0; n < 600; n++) begin
      logic [7:0] a;
      a = 8'($urandom);
      @(negedge clk) begin en = 1; addr = a; end
      @(negedge clk) begin
        en = 0; addr = 8'($urandom);
        checks++;
        if (rdata !== img[a]) failures++;
      end
      @(negedge clk);
      checks++;
      if (rdata !== img[a]) failures++;   // held while en is low
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
