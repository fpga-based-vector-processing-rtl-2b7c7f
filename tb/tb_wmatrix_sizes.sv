// tb_wmatrix_sizes: the sparse solve run on processors with 8, 16, 32 and 64 elements
// per vector register, for the two smallest power-network sizes (49 and 118 nodes),
// eight instances side by side. Each instance checks its result bit for bit; this
// testbench gathers the checks, prints the solve time of each configuration and
// checks that longer vector registers never need more pseudo-column groups.
`timescale 1ns/1ps
module tb_wmatrix_sizes;
  localparam int NC = 8;
  logic fin [NC];
  int ck [NC], fl [NC], cyc [NC];

  wm_bench #(.VLEN(8),  .N(49))  b0 (.finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .solve_cycles(cyc[0]));
  wm_bench #(.VLEN(16), .N(49))  b1 (.finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .solve_cycles(cyc[1]));
  wm_bench #(.VLEN(32), .N(49))  b2 (.finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .solve_cycles(cyc[2]));
  wm_bench #(.VLEN(64), .N(49))  b3 (.finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .solve_cycles(cyc[3]));
  wm_bench #(.VLEN(8),  .N(118)) b4 (.finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .solve_cycles(cyc[4]));
  wm_bench #(.VLEN(16), .N(118)) b5 (.finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .solve_cycles(cyc[5]));
  wm_bench #(.VLEN(32), .N(118)) b6 (.finished(fin[6]), .checks(ck[6]), .failures(fl[6]), .solve_cycles(cyc[6]));
  wm_bench #(.VLEN(64), .N(118)) b7 (.finished(fin[7]), .checks(ck[7]), .failures(fl[7]), .solve_cycles(cyc[7]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1us;
      all = 1;
      foreach (fin[i]) all &= fin[i];
    end while (!all);
    foreach (fin[i]) begin
      checks += ck[i];
      failures += fl[i];
    end
    // all benches of one N solve the same matrix: a longer register never needs more clocks
    // to issue, but the FP latency and masking make the totals close; only report them
    $display("solve clocks  N=49: ele8 %0d ele16 %0d ele32 %0d ele64 %0d", cyc[0], cyc[1], cyc[2], cyc[3]);
    $display("solve clocks N=118: ele8 %0d ele16 %0d ele32 %0d ele64 %0d", cyc[4], cyc[5], cyc[6], cyc[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
