// wm_bench: one W-matrix style sparse solve on a processor instance with VLEN elements
// per vector register and a random N x N unit lower-triangular factor (about 8 % filled).
// It builds the pseudo-column streams and the program, downloads them, runs the
// processor, checks x bit for bit against a reference that rounds after every
// operation, and reports the solve time in clocks. Used by tb_wmatrix_sizes.
module wm_bench
  import vp_pkg::*;
  import vp_asm_pkg::*;
#(
  parameter int VLEN = 32,
  parameter int N    = 49
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   solve_cycles
);
  localparam int XB   = 0;      // x vector
  localparam int DB   = 256;    // inverse diagonal
  localparam int S1   = 512;    // forward pseudo-column stream
  localparam int TA   = 7936;   // end of the space for the streams
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

  vector_processor #(.VLEN(VLEN)) dut (.*);

  for (genvar k = 0; k < LANES; k++) begin : g_fp
    fp_add_model #(.LAT(4)) u_add (.clk, .a(fadd_a[k]), .b(fadd_b[k]), .y(fadd_y[k]));
    fp_mul_model #(.LAT(3)) u_mul (.clk, .a(fmul_a[k]), .b(fmul_b[k]), .y(fmul_y[k]));
  end

  longint cycles = 0;
  always @(posedge clk) cycles++;

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

  // own generator, seeded by N, so that every VLEN sees the same matrix
  int unsigned lcg = 32'(N) * 2654435761;
  function automatic int unsigned nxt();
    lcg = lcg * 1103515245 + 12345;
    return lcg >> 8;
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'(nxt() % 1000001) / 1000000.0;
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

  initial begin : main
    int ne, s2, s_end;
    longint t0;
    logic [31:0] d;
    finished = 0; checks = 0; failures = 0; solve_cycles = 0;
    for (int i = 0; i < 8192; i++) mem[i] = 0;
    // random sparse unit lower-triangular factor, about 8 % filled below the diagonal
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        lnz[i][j] = (i > j) && (nxt() % 100 < 8 || (i == j + 1 && nxt() % 2 == 1));
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
    s_end = s_end + 1;
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
    for (int i = 0; i < s_end; i++) host_wr(i, mem[i]);

    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cycles;
    wait (done);
    solve_cycles = int'(cycles - t0);
    $display("VLEN=%0d N=%0d: %0d pseudo-columns, %0d elements, %0d cycles", VLEN, N, n_pseudo,
             n_elems, solve_cycles);
    for (int i = 0; i < N; i++) begin
      host_rd(XB + i, d);
      check($sformatf("x[%0d]", i), d, ref_mem[XB + i]);
    end
    finished = 1;
  end
endmodule
