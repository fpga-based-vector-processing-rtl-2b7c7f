// tb_vector_unit: the vector core with behavioural FP units and sixteen memory banks.
// Registers are loaded from memory, random arithmetic instructions (VADD, VSUB, VMUL,
// VADDS, VMULS) run with random VLR and VMR, and all registers are stored back and
// compared with a model that rounds every operation to single precision. Checks the
// throughput of eight results per clock: an arithmetic instruction keeps the unit busy
// for ceil(VLR/8) issue clocks plus the FP latency plus one (less when the mask
// disables the last groups: busy ends one clock after the last result written).
module tb_vector_unit;
  import vp_pkg::*;
  import vp_asm_pkg::*;
  localparam int VLEN = 32, FADD_LAT = 4, FMUL_LAT = 3;

  logic clk = 0, rst_n = 0;
  logic issue_valid = 0, issue_ready, busy, vmi_busy, mem_conflict;
  vinstr_t issue;
  logic [5:0] vlr = 0;
  logic [VLEN-1:0] vmr = '1;
  logic s_req = 0, s_we = 0;
  daddr_t s_addr = '0;
  word_t s_wdata = '0, s_rdata;
  word_t fadd_a [LANES], fadd_b [LANES], fadd_y [LANES];
  word_t fmul_a [LANES], fmul_b [LANES], fmul_y [LANES];
  logic m_en [DGROUPS][LANES], m_we [DGROUPS][LANES];
  logic [DROW_W-1:0] m_addr [DGROUPS][LANES];
  word_t m_wdata [DGROUPS][LANES], m_rdata [DGROUPS][LANES];
  logic h_en = 0, h_we = 0;
  daddr_t h_addr = '0, h_addr_q;
  word_t h_wdata = '0;
  word_t h_rdata [DGROUPS][LANES];

  always #5 clk = ~clk;

  vector_unit #(.VLEN(VLEN), .FADD_LAT(FADD_LAT), .FMUL_LAT(FMUL_LAT)) dut (.*);
  for (genvar k = 0; k < LANES; k++) begin : g_fp
    fp_add_model #(.LAT(FADD_LAT)) u_add (.clk, .a(fadd_a[k]), .b(fadd_b[k]), .y(fadd_y[k]));
    fp_mul_model #(.LAT(FMUL_LAT)) u_mul (.clk, .a(fmul_a[k]), .b(fmul_b[k]), .y(fmul_y[k]));
  end
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

  word_t vr [8][VLEN];
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic vop(vop_e op, int vd, int va, int vb, word_t s, int imm, int l,
                     logic [VLEN-1:0] m, output int t);
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue_valid = 1;
    issue = '{op: op, vd: 3'(vd), va: 3'(va), vb: 3'(vb), imm: 13'(imm), s: s};
    vlr = 6'(l); vmr = m;
    @(negedge clk);
    issue_valid = 0;
    t = 0;
    while (busy) begin t++; @(negedge clk); end
  endtask

  initial begin
    int t, l;
    logic [VLEN-1:0] m;
    word_t d, s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++)
      for (int e = 0; e < VLEN; e++) begin
        vr[r][e] = f_of(real'($urandom_range(0, 20000)) / 1000.0 - 10.0);
        hw(r * 64 + e, vr[r][e]);
      end
    for (int r = 0; r < 8; r++) vop(VOP_VLD, r, 0, 0, 32'(r * 64), 0, VLEN, '1, t);
    for (int n = 0; n < 200; n++) begin
      vop_e op;
      int vd, va, vb;
      word_t res [VLEN];
      vop_e ops [5] = '{VOP_VADD, VOP_VSUB, VOP_VMUL, VOP_VADDS, VOP_VMULS};
      op = ops[n % 5];
      vd = $urandom_range(0, 7); va = $urandom_range(0, 7); vb = $urandom_range(0, 7);
      l = $urandom_range(1, VLEN);
      m = (n % 2 == 0) ? '1 : VLEN'($urandom);
      s = f_of(real'($urandom_range(0, 4000)) / 1000.0 - 2.0);
      for (int e = 0; e < VLEN; e++) begin
        case (op)
          VOP_VADD:  res[e] = f_add(vr[va][e], vr[vb][e]);
          VOP_VSUB:  res[e] = f_add(vr[va][e], vr[vb][e] ^ 32'h8000_0000);
          VOP_VMUL:  res[e] = f_mul(vr[va][e], vr[vb][e]);
          VOP_VADDS: res[e] = f_add(vr[va][e], s);
          default:   res[e] = f_mul(vr[va][e], s);
        endcase
      end
      vop(op, vd, va, vb, s, 0, l, m, t);
      for (int e = 0; e < l; e++) if (m[e]) vr[vd][e] = res[e];
      // busy ends one clock after the last enabled result is written
      begin
        int groups, gl, lat, texp;
        groups = (l + LANES - 1) / LANES;
        gl = -100;
        lat = (op inside {VOP_VMUL, VOP_VMULS}) ? FMUL_LAT : FADD_LAT;
        for (int e = 0; e < l; e++) if (m[e]) gl = e / LANES;
        texp = ((gl + 1 + lat > groups) ? gl + 1 + lat : groups) + 1;
        checks++;
        if (t != texp) begin
          failures++;
          $display("%s vlr=%0d busy %0d clocks, expected %0d", op.name(), l, t, texp);
        end
      end
    end
    for (int r = 0; r < 8; r++) vop(VOP_VST, r, 0, 0, 32'(4096 + r * 64), 0, VLEN, '1, t);
    for (int r = 0; r < 8; r++)
      for (int e = 0; e < VLEN; e++) begin
        hr(4096 + r * 64 + e, d);
        checks++;
        if (d !== vr[r][e]) begin
          failures++;
          if (failures < 10) $display("v%0d[%0d] = %h, expected %h", r, e, d, vr[r][e]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
