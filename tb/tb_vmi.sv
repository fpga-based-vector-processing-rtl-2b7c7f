// tb_vmi: the vector memory interface with a real register file and sixteen memory
// banks. Random unit-stride loads and stores (any start bank, any length, random
// masks), gathers and scatters with random indices, and scalar loads and stores are
// checked against a memory model; contents of registers are checked by storing them
// back. The busy time of every vector access is checked: groups + 1 clocks for a
// unit-stride load, and for indexed accesses one clock per group plus one per extra
// element on an already-used memory lane (the conflict count computed here).
module tb_vmi;
  import vp_pkg::*;
  localparam int VLEN = 32, RPR = VLEN / LANES, RAW = 5;

  logic clk = 0, rst_n = 0;
  logic s_req = 0, s_we = 0;
  daddr_t s_addr = '0;
  word_t s_wdata = '0, s_rdata;
  logic cmd_valid = 0;
  vmop_e cmd_op = VM_LD;
  logic [2:0] cmd_reg = 0, cmd_idx = 0;
  daddr_t cmd_base = '0;
  logic [5:0] cmd_vlr = 0;
  logic [VLEN-1:0] cmd_vmr = '1;
  logic busy, conflict;
  logic [RAW-1:0] rf_ra0 [LANES], rf_ra1 [LANES], rf_wa [LANES];
  word_t rf_rd0 [LANES], rf_rd1 [LANES], rf_wd [LANES];
  logic rf_we [LANES];
  logic m_en [DGROUPS][LANES], m_we [DGROUPS][LANES];
  logic [DROW_W-1:0] m_addr [DGROUPS][LANES];
  word_t m_wdata [DGROUPS][LANES], m_rdata [DGROUPS][LANES];

  // host-side bank port for preloading and checking
  logic h_en = 0, h_we = 0;
  daddr_t h_addr = '0;
  word_t h_wdata = '0;
  word_t h_rdata [DGROUPS][LANES];
  daddr_t h_addr_q;

  always #5 clk = ~clk;

  vmi #(.VLEN(VLEN)) dut (.*);
  vector_regfile #(.VLEN(VLEN)) u_vrf (.clk, .ra0(rf_ra0), .rd0(rf_rd0), .ra1(rf_ra1),
                                      .rd1(rf_rd1), .we(rf_we), .wa(rf_wa), .wd(rf_wd));
  for (genvar gr = 0; gr < DGROUPS; gr++) begin : g_g
    for (genvar m = 0; m < LANES; m++) begin : g_m
      dmem_bank u_b (.clk, .a_en(m_en[gr][m]), .a_we(m_we[gr][m]), .a_addr(m_addr[gr][m]),
                     .a_wdata(m_wdata[gr][m]), .a_rdata(m_rdata[gr][m]),
                     .b_en(h_en && h_addr[12] == gr[0] && h_addr[2:0] == m),
                     .b_we(h_we), .b_addr(h_addr[11:3]), .b_wdata(h_wdata),
                     .b_rdata(h_rdata[gr][m]));
    end
  end
  always @(posedge clk) if (h_en) h_addr_q <= h_addr;

  word_t mm [8192];       // memory model
  word_t vr [8][VLEN];    // register model
  int checks = 0, failures = 0, conflicts = 0;
  always @(posedge clk) conflicts += int'(conflict);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hw(int a, word_t d);
    @(negedge clk) begin h_en = 1; h_we = 1; h_addr = daddr_t'(a); h_wdata = d; end
    @(negedge clk) begin h_en = 0; h_we = 0; end
  endtask
  task automatic hr(int a, output word_t d);
    @(negedge clk) begin h_en = 1; h_we = 0; h_addr = daddr_t'(a); end
    @(negedge clk) h_en = 0;
    d = h_rdata[h_addr_q[12]][h_addr_q[2:0]];
  endtask

  // run one vector command and return the clocks busy was high
  task automatic vcmd(vmop_e op, int r, int x, int base, int vlr, logic [VLEN-1:0] vmr,
                      output int t);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_reg = 3'(r); cmd_idx = 3'(x);
    cmd_base = daddr_t'(base); cmd_vlr = 6'(vlr); cmd_vmr = vmr;
    @(negedge clk);
    cmd_valid = 0;
    t = 0;
    while (busy) begin t++; @(negedge clk); end
  endtask

  function automatic int lanes_time(int x, int base, int vlr, logic [VLEN-1:0] vmr);
    int t = 0;
    for (int g = 0; g * LANES < vlr; g++) begin
      int cnt [LANES] = '{default: 0};
      int mx = 1;
      for (int k = 0; k < LANES; k++) begin
        int e = g * LANES + k;
        if (e < vlr && vmr[e]) begin
          int l = (base + vr[x][e]) % LANES;
          cnt[l]++;
          if (cnt[l] > mx) mx = cnt[l];
        end
      end
      t += mx;
    end
    return t;
  endfunction

  task automatic expect_t(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d clocks, expected %0d", what, got, exp); end
  endtask

  initial begin
    int t, base, vlr, r, x;
    logic [VLEN-1:0] vmr;
    word_t d;
    for (int i = 0; i < 8192; i++) mm[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8192; i++) hw(i, mm[i]);
    for (int r0 = 0; r0 < 8; r0++) begin   // give every register defined contents
      vcmd(VM_LD, r0, 0, r0 * 64, VLEN, '1, t);
      for (int e = 0; e < VLEN; e++) vr[r0][e] = mm[r0 * 64 + e];
      expect_t("vld full", t, RPR + 1);
    end
    for (int n = 0; n < 120; n++) begin
      r = $urandom_range(0, 7);
      base = $urandom_range(0, 8191);
      vlr = $urandom_range(1, VLEN);
      vmr = (n % 3 == 0) ? '1 : VLEN'($urandom);
      case (n % 4)
        0: begin  // unit-stride load
          vcmd(VM_LD, r, 0, base, vlr, vmr, t);
          for (int e = 0; e < vlr; e++) if (vmr[e]) vr[r][e] = mm[(base + e) % 8192];
          expect_t("vld", t, (vlr + LANES - 1) / LANES + 1);
        end
        1: begin  // unit-stride store
          vcmd(VM_ST, r, 0, base, vlr, vmr, t);
          for (int e = 0; e < vlr; e++) if (vmr[e]) mm[(base + e) % 8192] = vr[r][e];
          expect_t("vst", t, (vlr + LANES - 1) / LANES);
        end
        2: begin  // gather with small random indices (conflicts likely)
          x = (r + 1) % 8;
          for (int e = 0; e < VLEN; e++) mm[7000 + e] = $urandom_range(0, 40);
          for (int e = 0; e < VLEN; e++) hw(7000 + e, mm[7000 + e]);
          vcmd(VM_LD, x, 0, 7000, VLEN, '1, t);
          for (int e = 0; e < VLEN; e++) vr[x][e] = mm[7000 + e];
          base = $urandom_range(0, 6000);
          vcmd(VM_LDX, r, x, base, vlr, vmr, t);
          expect_t("vldx", t, lanes_time(x, base, vlr, vmr) + 1);
          for (int e = 0; e < vlr; e++) if (vmr[e]) vr[r][e] = mm[base + vr[x][e]];
        end
        default: begin  // scatter through a permutation of distinct indices
          int perm [VLEN];
          x = (r + 3) % 8;
          foreach (perm[i]) perm[i] = i * 3;
          perm.shuffle();
          for (int e = 0; e < VLEN; e++) mm[7100 + e] = perm[e];
          for (int e = 0; e < VLEN; e++) hw(7100 + e, mm[7100 + e]);
          vcmd(VM_LD, x, 0, 7100, VLEN, '1, t);
          for (int e = 0; e < VLEN; e++) vr[x][e] = mm[7100 + e];
          base = $urandom_range(0, 6000);
          vcmd(VM_STX, r, x, base, vlr, vmr, t);
          expect_t("vstx", t, lanes_time(x, base, vlr, vmr));
          for (int e = 0; e < vlr; e++) if (vmr[e]) mm[base + vr[x][e]] = vr[r][e];
        end
      endcase
      // scalar store and load through the scalar port
      begin
        int a;
        word_t w;
        a = $urandom_range(0, 8191);
        w = $urandom;
        @(negedge clk) begin s_req = 1; s_we = 1; s_addr = daddr_t'(a); s_wdata = w; end
        mm[a] = w;
        a = $urandom_range(0, 8191);
        @(negedge clk) begin s_req = 1; s_we = 0; s_addr = daddr_t'(a); end
        @(negedge clk) s_req = 0;
        checks++;
        if (s_rdata !== mm[a]) begin failures++; $display("scalar load %0d", a); end
      end
    end
    // final: every register stored back, whole memory compared
    for (int r0 = 0; r0 < 8; r0++) begin
      vcmd(VM_ST, r0, 0, 7500 + r0 * VLEN, VLEN, '1, t);
      for (int e = 0; e < VLEN; e++) mm[7500 + r0 * VLEN + e] = vr[r0][e];
    end
    for (int i = 0; i < 8192; i++) begin
      hr(i, d);
      checks++;
      if (d !== mm[i]) begin
        failures++;
        if (failures < 10) $display("mem[%0d] = %h, expected %h", i, d, mm[i]);
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no lane conflict seen"); end
    $display("lane conflicts: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
