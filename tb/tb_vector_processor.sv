// tb_vector_processor: end-to-end test of the whole processor at its default parameters.
//
// Runs a W-matrix style sparse linear solve x = L^-T D^-1 L^-1 b for a random sparse
// unit lower-triangular L of size N (49, the smallest power-network size), stored as
// pseudo-columns: groups of up to VLEN matrix elements with distinct row indices, so
// that one gather / multiply / add / scatter sequence applies a whole group without a
// recurrence. The forward pass, the diagonal scaling and the backward pass are each a
// loop of the processor program below. A final section exercises masking (VMR),
// VSUB/VADDS/VMULS and the scalar ALU. Every result word is compared bit for bit with a
// reference that applies the same operations in the same order, rounding to single
// precision after each one. Pipeline and memory events are counted and each must occur.
module tb_vector_processor;
  import vp_pkg::*;
  import vp_asm_pkg::*;

  localparam int VLEN = 32;
  localparam int N    = 49;
  localparam int XB   = 0;      // x vector
  localparam int DB   = 256;    // inverse diagonal
  localparam int S1   = 512;    // forward pseudo-column stream
  localparam int TA   = 7936;   // extra-test area
  localparam int MAXW = 4000;

  logic clk = 0, rst_n = 0, start = 0;
  logic done, busy;
  vp_events_t events;
  logic host_imem_we = 0;
  pc_t  host_imem_addr = '0;
  word_t host_imem_wdata = '0;
  logic host_dmem_en = 0, host_dmem_we = 0;
  daddr_t host_dmem_addr = '0;
  word_t host_dmem_wdata = '0, host_dmem_rdata;
  word_t fadd_a [LANES], fadd_b [LANES], fadd_y [LANES];
  word_t fmul_a [LANES], fmul_b [LANES], fmul_y [LANES];

  always #5 clk = ~clk;

  vector_processor dut (.*);

  for (genvar k = 0; k < LANES; k++) begin : g_fp
    fp_add_model #(.LAT(4)) u_add (.clk, .a(fadd_a[k]), .b(fadd_b[k]), .y(fadd_y[k]));
    fp_mul_model #(.LAT(3)) u_mul (.clk, .a(fmul_a[k]), .b(fmul_b[k]), .y(fmul_y[k]));
  end

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // event counters
  int n_ev [7];
  always @(posedge clk) if (rst_n) begin
    n_ev[0] += int'(events.forward);
    n_ev[1] += int'(events.load_use);
    n_ev[2] += int'(events.mts_wait);
    n_ev[3] += int'(events.flush);
    n_ev[4] += int'(events.vec_wait);
    n_ev[5] += int'(events.mem_wait);
    n_ev[6] += int'(events.mem_conflict);
  end
  // unit-stride loads starting off bank 0 (from the stream layout) and masked-off
  // elements (from the mask pattern) are counted where the data is laid out
  int n_unaligned = 0, n_masked = 0;

  // ---------------- memory images ----------------
  logic [31:0] mem [8192];
  logic [31:0] ref_mem [8192];
  logic [31:0] prog [256];
  int          plen;

  // sparse factor: lval[i][j] for i > j
  real lval [N][N];
  bit  lnz  [N][N];

  // pseudo-column element lists
  int pr [MAXW], pcl [MAXW];
  real pv [MAXW];

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  // Build a pseudo-column stream at `addr` from the element list (row, col, value) in
  // column-application order; returns the address after the terminating zero.
  int cur_r [VLEN];
  int n_pseudo = 0, n_elems = 0;
  function automatic int emit_stream(int addr, int ne);
    int i = 0;
    int a = addr;
    while (i < ne) begin
      int cnt = 0;
      // take whole columns while rows stay distinct and no column is a row already
      int j = i;
      while (j < ne) begin
        int col = pcl[j];
        int e = j;
        bit ok = 1;
        while (e < ne && pcl[e] == col) e++;
        if (cnt == 0 && e - j > VLEN) e = j + VLEN;   // split a column longer than VLEN
        if (cnt + (e - j) > VLEN) ok = 0;
        for (int q = 0; q < cnt && ok; q++) begin
          if (cur_r[q] == col) ok = 0;
          for (int t = j; t < e; t++) if (cur_r[q] == pr[t]) ok = 0;
        end
        if (!ok) break;
        for (int t = j; t < e; t++) begin
          cur_r[cnt] = pr[t];
          cnt++;
        end
        j = e;
      end
      // write the group: len, R[], C[], V[]
      mem[a] = cnt;
      for (int q = 0; q < cnt; q++) begin
        mem[a + 1 + q]           = XB + pr[i + q];
        mem[a + 1 + cnt + q]     = XB + pcl[i + q];
        mem[a + 1 + 2 * cnt + q] = f_of(pv[i + q]);
      end
      // reference: gather, multiply, add, scatter
      begin
        logic [31:0] xr [VLEN], xc [VLEN];
        for (int q = 0; q < cnt; q++) begin
          xr[q] = ref_mem[XB + pr[i + q]];
          xc[q] = ref_mem[XB + pcl[i + q]];
        end
        for (int q = 0; q < cnt; q++)
          ref_mem[XB + pr[i + q]] = f_add(xr[q], f_mul(f_of(pv[i + q]), xc[q]));
      end
      n_pseudo++;
      n_elems += cnt;
      for (int q = 0; q < 3; q++) n_unaligned += int'((a + 1 + q * cnt) % LANES != 0);
      a += 1 + 3 * cnt;
      i = j;
    end
    mem[a] = 0;
    return a + 1;
  endfunction

  // ---------------- program ----------------
  int L1, E1, L2, L3, E3;
  function automatic void put(logic [31:0] w);
    prog[plen] = w; plen++;
  endfunction
  function automatic int rel(int target);   // branch offset from the next instruction
    return target - (plen + 1);
  endfunction

  task automatic solve_loop(int stream, output int top, output int bottom, input int e_guess);
    put(sI(OP_ADDI, 1, 0, 0, stream));
    top = plen;
    put(sI(OP_LW,   2, 1, 0, 0));           // len
    put(sI(OP_BEQ,  0, 2, 0, e_guess - (plen + 1)));
    put(sI(OP_MTS,  0, 2, 0, 0));           // VLR = len
    put(vI(VOP_VLD, 0, 1, 0, 0, 1));        // v0 = R
    put(sI(OP_ADD,  6, 1, 2, 0));           // r6 = p + len
    put(sI(OP_ADD,  7, 6, 2, 0));           // r7 = p + 2 len
    put(vI(VOP_VLD, 1, 6, 0, 0, 1));        // v1 = C
    put(vI(VOP_VLD, 2, 7, 0, 0, 1));        // v2 = V
    put(vI(VOP_VLDX, 3, 0, 0, 0, XB));      // v3 = x[R]
    put(vI(VOP_VLDX, 4, 0, 0, 1, XB));      // v4 = x[C]
    put(vI(VOP_VMUL, 5, 0, 2, 4, 0));       // v5 = V * x[C]
    put(vI(VOP_VADD, 3, 0, 3, 5, 0));       // v3 = x[R] + v5
    put(vI(VOP_VSTX, 3, 0, 0, 0, XB));      // x[R] = v3
    put(sI(OP_ADD,  3, 7, 2, 0));           // r3 = p + 3 len
    put(sI(OP_ADDI, 1, 3, 0, 1));           // next group
    put(sI(OP_JMP,  0, 0, 0, top));
    bottom = plen;
  endtask

  task automatic build_prog(int s2, int pass);
    int t, b;
    plen = 0;
    solve_loop(S1, t, b, (pass == 0) ? 0 : E1); L1 = t; E1 = b;
    // diagonal: x[i] *= dinv[i], VLEN at a time
    put(sI(OP_ADDI, 8, 0, 0, N));
    put(sI(OP_ADDI, 9, 0, 0, 0));
    put(sI(OP_ADDI, 10, 0, 0, VLEN));
    L2 = plen;
    put(sI(OP_MTS,  0, 8, 0, 0));
    put(vI(VOP_VLD, 0, 9, 0, 0, XB));
    put(vI(VOP_VLD, 1, 9, 0, 0, DB));
    put(vI(VOP_VMUL, 0, 0, 0, 1, 0));
    put(vI(VOP_VST, 0, 9, 0, 0, XB));
    put(sI(OP_ADD,  9, 9, 10, 0));
    put(sI(OP_SUB,  8, 8, 10, 0));
    put(sI(OP_SLT,  3, 0, 8, 0));
    put(sI(OP_BNE,  0, 3, 0, rel(L2)));
    solve_loop(s2, t, b, (pass == 0) ? 0 : E3); L3 = t; E3 = b;
    // extra test: masking, VSUB, VADDS, VMULS, scalar ALU
    put(sI(OP_ADDI, 11, 0, 0, VLEN));
    put(sI(OP_MTS,  0, 11, 0, 0));          // VLR = VLEN
    put(vI(VOP_VLD, 6, 0, 0, 0, TA));       // v6 = A
    put(vI(VOP_VLD, 7, 0, 0, 0, TA + 32));  // v7 = B
    put(vI(VOP_VLD, 4, 0, 0, 0, TA + 128)); // v4 = old contents
    put(sI(OP_LW,   12, 0, 0, TA + 64));    // mask pattern
    put(sI(OP_MTS,  1, 12, 0, 0));          // VMR
    put(vI(VOP_VSUB, 6, 0, 6, 7, 0));       // masked: v6 = A - B where mask
    put(sI(OP_LW,   13, 0, 0, TA + 65));    // scalar float s
    put(vI(VOP_VADDS, 5, 13, 7, 0, 0));     // masked: v5 = B + s
    put(vI(VOP_VMULS, 4, 13, 7, 0, 0));     // masked: v4 = B * s
    put(sI(OP_ADDI, 14, 0, 0, -1));
    put(sI(OP_MTS,  1, 14, 0, 0));          // VMR = all ones
    put(vI(VOP_VST, 6, 0, 0, 0, TA + 96));
    put(vI(VOP_VST, 4, 0, 0, 0, TA + 160));
    put(sI(OP_ADDI, 2, 0, 0, 1234));
    put(sI(OP_MUL,  3, 2, 2, 0));           // 1234*1234
    put(sI(OP_SLL,  4, 3, 0, 3));
    put(sI(OP_AND,  5, 4, 12, 0));
    put(sI(OP_OR,   6, 5, 2, 0));
    put(sI(OP_SW,   0, 0, 6, TA + 192));
    put(sI(OP_SW,   0, 0, 3, TA + 193));
    put(sI(OP_HALT, 0, 0, 0, 0));
  endtask

  // ---------------- host helpers ----------------
  task automatic host_wr(int a, logic [31:0] d);
    @(negedge clk);
    host_dmem_en = 1; host_dmem_we = 1; host_dmem_addr = daddr_t'(a); host_dmem_wdata = d;
    @(negedge clk);
    host_dmem_en = 0; host_dmem_we = 0;
  endtask
  task automatic host_rd(int a, output logic [31:0] d);
    @(negedge clk);
    host_dmem_en = 1; host_dmem_we = 0; host_dmem_addr = daddr_t'(a);
    @(negedge clk);
    host_dmem_en = 0;
    d = host_dmem_rdata;
  endtask

  function automatic void check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %08h expected %08h", what, got, exp);
    end
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int ne, s2, s_end;
    longint t0;
    logic [31:0] d, mask;
    foreach (n_ev[i]) n_ev[i] = 0;
    for (int i = 0; i < 8192; i++) mem[i] = 0;
    // random sparse unit lower-triangular factor, about 8 % filled below the diagonal
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        lnz[i][j] = (i > j) && ($urandom_range(0, 99) < 8 || (i == j + 1 && $urandom_range(0, 1) == 1));
        lval[i][j] = lnz[i][j] ? rnd(-0.5, 0.5) : 0.0;
      end
    for (int i = 0; i < N; i++) begin
      mem[XB + i] = f_of(rnd(-4.0, 4.0));     // b
      mem[DB + i] = f_of(rnd(0.5, 2.0));      // 1/d_ii
    end
    for (int i = 0; i < 8192; i++) ref_mem[i] = mem[i];
    // forward pass: column j adds -l_ij * z_j to z_i
    ne = 0;
    for (int j = 0; j < N; j++)
      for (int i = j + 1; i < N; i++) if (lnz[i][j]) begin
        pr[ne] = i; pcl[ne] = j; pv[ne] = -lval[i][j]; ne++;
      end
    s2 = emit_stream(S1, ne);
    // diagonal, in the reference
    for (int i = 0; i < N; i++) ref_mem[XB + i] = f_mul(ref_mem[XB + i], ref_mem[DB + i]);
    // backward pass: column j of L^T, from the last column to the first
    ne = 0;
    for (int j = N - 1; j >= 0; j--)
      for (int i = 0; i < j; i++) if (lnz[j][i]) begin
        pr[ne] = i; pcl[ne] = j; pv[ne] = -lval[j][i]; ne++;
      end
    s_end = emit_stream(s2, ne);
    if (s_end > TA) $fatal(1, "data does not fit");
    // extra-test data
    mask = 32'h5A5A_C3C3;
    for (int i = 0; i < 32; i++) begin
      mem[TA + i]      = f_of(rnd(-8.0, 8.0));
      mem[TA + 32 + i] = f_of(rnd(-8.0, 8.0));
    end
    mem[TA + 64] = mask;
    mem[TA + 65] = f_of(1.75);
    for (int i = 0; i < 32; i++) begin
      ref_mem[TA + 96 + i]  = mask[i] ? f_add(mem[TA + i], mem[TA + 32 + i] ^ 32'h8000_0000)
                                      : mem[TA + i];
      mem[TA + 128 + i]     = 32'hDEAD_0000 + i;
      ref_mem[TA + 160 + i] = 32'hDEAD_0000 + i;   // masked lanes keep old v4 contents
    end
    ref_mem[TA + 193] = 32'd1234 * 32'd1234;
    ref_mem[TA + 192] = (((32'd1234 * 32'd1234) << 3) & mask) | 32'd1234;

    // program: two passes so that forward branch targets are known
    build_prog(s2, 0);
    build_prog(s2, 1);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < plen; i++) begin
      @(negedge clk);
      host_imem_we = 1; host_imem_addr = pc_t'(i); host_imem_wdata = prog[i];
    end
    @(negedge clk) host_imem_we = 0;
    for (int i = 0; i < TA + 160; i++) host_wr(i, mem[i]);

    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cycles;
    wait (done);
    $display("solve N=%0d: %0d pseudo-columns, %0d elements, %0d cycles", N, n_pseudo, n_elems,
             cycles - t0);
    for (int i = 0; i < N; i++) begin
      host_rd(XB + i, d);
      check($sformatf("x[%0d]", i), d, ref_mem[XB + i]);
    end
    for (int i = 0; i < 32; i++) begin
      host_rd(TA + 96 + i, d);
      check($sformatf("vsub[%0d]", i), d, ref_mem[TA + 96 + i]);
      host_rd(TA + 160 + i, d);
      if (mask[i]) check($sformatf("vmuls[%0d]", i), d, f_mul(mem[TA + 32 + i], f_of(1.75)));
      else begin
        check($sformatf("vmuls[%0d]", i), d, ref_mem[TA + 160 + i]);
        n_masked++;
      end
    end
    host_rd(TA + 192, d); check("scalar alu", d, ref_mem[TA + 192]);
    host_rd(TA + 193, d); check("scalar mul", d, ref_mem[TA + 193]);
    // every mechanism must have happened
    begin
      string nm [7] = '{"forward", "load_use", "mts_wait", "flush", "vec_wait", "mem_wait",
                        "mem_conflict"};
      for (int i = 0; i < 7; i++) begin
        $display("event %-13s %0d", nm[i], n_ev[i]);
        checks++;
        if (n_ev[i] == 0) begin failures++; $display("event %s never happened", nm[i]); end
      end
      $display("unaligned unit-stride loads %0d, masked-off elements checked %0d", n_unaligned,
               n_masked);
      checks += 2;
      if (n_unaligned == 0) failures++;
      if (n_masked == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
