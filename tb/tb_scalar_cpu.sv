// tb_scalar_cpu: the scalar pipeline with its instruction memory, a data memory model
// and a stand-in vector unit that accepts instructions at random and keeps the memory
// interface busy for a few clocks after a vector memory instruction. The program has
// back-to-back dependences (forwarding), a load-use pair, a move to VLR before a
// vector instruction, a counted loop, a jump and a taken branch that must squash the
// instructions behind them. Memory results, the vector instructions handed over (with
// their forwarded scalar operand and VLR), stall/flush events and HALT are checked.
// A second phase runs random programs (dense register dependences, loads, stores,
// forward branches, MTS and vector instructions) and compares the data memory, the
// final registers and every handed-over vector instruction with an instruction-level
// model of the ISA that knows nothing about the pipeline.
module tb_scalar_cpu;
  import vp_pkg::*;
  import vp_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic running, halted;
  logic imem_en;
  pc_t imem_addr;
  word_t imem_rdata;
  logic v_valid, v_ready;
  vinstr_t v_instr;
  logic [5:0] v_vlr;
  logic [31:0] v_vmr;
  logic d_req, d_we, vmi_busy;
  daddr_t d_addr;
  word_t d_wdata, d_rdata;
  logic ev_forward, ev_load_use, ev_mts_wait, ev_flush, ev_vec_wait, ev_mem_wait;

  logic host_we = 0;
  pc_t host_addr = '0;
  word_t host_wdata = '0;

  always #5 clk = ~clk;

  scalar_cpu dut (.*);
  imem u_imem (.clk, .en(imem_en), .addr(imem_addr), .rdata(imem_rdata),
               .host_we, .host_addr, .host_wdata);

  // data memory model, one clock read latency
  word_t dm [8192];
  always @(posedge clk) if (d_req) begin
    d_rdata <= dm[d_addr];
    if (d_we) dm[d_addr] <= d_wdata;
  end

  // vector unit stand-in
  int busy_left = 0;
  vinstr_t issued [$];
  int issued_vlr [$];
  logic [31:0] issued_vmr [$];
  always @(posedge clk) begin
    v_ready  <= ($urandom_range(0, 2) != 0);
    if (rst_n && v_valid && v_ready) begin
      issued.push_back(v_instr);
      issued_vlr.push_back(int'(v_vlr));
      issued_vmr.push_back(v_vmr);
      if (is_vmem(v_instr.op)) busy_left <= 4;
    end else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign vmi_busy = (busy_left > 0);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_lu = 0, n_mts = 0, n_fl = 0, n_vw = 0, n_mw = 0;
  always @(posedge clk) if (rst_n && running) begin
    n_fwd += int'(ev_forward); n_lu += int'(ev_load_use); n_mts += int'(ev_mts_wait);
    n_fl += int'(ev_flush); n_vw += int'(ev_vec_wait); n_mw += int'(ev_mem_wait);
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // ---------------- random programs against an instruction-level model ----------------
  typedef struct { logic [3:0] op; int rd, rs, rt, imm; logic vec; } rinstr_t;
  localparam int RN = 60;

  function automatic logic [31:0] sx15(int imm);
    return {{17{imm[14]}}, imm[14:0]};
  endfunction

  task automatic random_round(int round);
    word_t   p [256];
    word_t   rf [16];
    word_t   rm [8192];
    word_t   ex_s [$];
    int      ex_vlr [$];
    word_t   ex_vmr [$];
    int      n = 0, pc, steps;
    int      vlr = 32;
    word_t   vmr = '1;
    // program
    for (int i = 0; i < RN; i++) begin
      int k = $urandom_range(0, 99);
      int rd = $urandom_range(1, 7), rs = $urandom_range(0, 7), rt = $urandom_range(0, 7);
      if (k < 40) begin
        sop_e ops [7] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_MUL, OP_SLT, OP_ADD};
        p[n++] = sI(ops[$urandom_range(0, 6)], rd, rs, rt, 0);
      end else if (k < 52) p[n++] = sI(OP_ADDI, rd, rs, 0, $urandom_range(0, 400) - 200);
      else if (k < 56) p[n++] = sI(OP_SLL, rd, rs, 0, $urandom_range(0, 31));
      else if (k < 68) p[n++] = sI(OP_LW, rd, 0, 0, 200 + $urandom_range(0, 15));
      else if (k < 78) p[n++] = sI(OP_SW, 0, 0, rt, 200 + $urandom_range(0, 15));
      else if (k < 84) p[n++] = sI(($urandom_range(0, 1) != 0) ? OP_BEQ : OP_BNE, 0, rs, rt,
                                   $urandom_range(0, 2));
      else if (k < 88) p[n++] = sI(OP_MTS, $urandom_range(0, 1), rs, 0, 0);
      else if (k < 94) p[n++] = vI(VOP_VADDS, 1, rs, 2, 0, 0);
      else if (k < 97) p[n++] = vI(VOP_VLD, 3, rs, 0, 0, $urandom_range(0, 8191));
      else begin   // taken branch in execute while a vector instruction waits for an MTS
        p[n++] = sI(OP_MTS, 0, rs, 0, 0);
        p[n++] = sI(OP_BEQ, 0, 0, 0, 1);
        p[n++] = vI(VOP_VADDS, 1, rs, 2, 0, 0);
      end
    end
    for (int r = 1; r < 8; r++) p[n++] = sI(OP_SW, 0, 0, r, 300 + r);
    p[n++] = sI(OP_HALT, 0, 0, 0, 0);
    for (int i = n; i < n + 4; i++) p[i] = sI(OP_SW, 0, 0, 0, 299);
    // model
    foreach (rm[i]) rm[i] = 32'(i) * 32'h9E37_79B1;
    foreach (rf[i]) rf[i] = '0;
    pc = 0;
    steps = 0;
    while (steps < 1000) begin
      logic [31:0] w = p[pc];
      logic [3:0] op = w[30:27];
      int rd = int'(w[26:23]), rs = int'(w[22:19]), rt = int'(w[18:15]);
      logic [31:0] a = rf[rs], b = rf[rt], imm = sx15(int'(w[14:0]));
      steps++;
      if (w[31]) begin
        ex_s.push_back(a); ex_vlr.push_back(vlr); ex_vmr.push_back(vmr);
        pc++;
        continue;
      end
      if (op == OP_HALT) break;
      pc++;
      case (sop_e'(op))
        OP_ADD:  rf[rd] = a + b;
        OP_SUB:  rf[rd] = a - b;
        OP_AND:  rf[rd] = a & b;
        OP_OR:   rf[rd] = a | b;
        OP_SLL:  rf[rd] = a << imm[4:0];
        OP_MUL:  rf[rd] = 32'($signed(a[15:0]) * $signed(b[15:0]));
        OP_ADDI: rf[rd] = a + imm;
        OP_SLT:  rf[rd] = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_LW:   rf[rd] = rm[13'(a + imm)];
        OP_SW:   rm[13'(a + imm)] = b;
        OP_BEQ:  if (a == b) pc = pc + int'($signed(imm));
        OP_BNE:  if (a != b) pc = pc + int'($signed(imm));
        OP_MTS:  if (rd == 0) vlr = (a > 32) ? 32 : int'(a); else vmr = a;
        default: ;
      endcase
      rf[0] = '0;
    end
    // hardware
    rst_n = 0;
    issued.delete(); issued_vlr.delete(); issued_vmr.delete();
    foreach (dm[i]) dm[i] = 32'(i) * 32'h9E37_79B1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < n + 4; i++) begin
      @(negedge clk) begin host_we = 1; host_addr = pc_t'(i); host_wdata = p[i]; end
    end
    @(negedge clk) host_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (halted);
    repeat (3) @(negedge clk);
    for (int a = 200; a < 216; a++) chk($sformatf("round %0d M[%0d]", round, a), dm[a], rm[a]);
    for (int r = 1; r < 8; r++) chk($sformatf("round %0d r%0d", round, r), dm[300 + r], rm[300 + r]);
    chk($sformatf("round %0d squashed store", round), dm[299], rm[299]);
    chk($sformatf("round %0d vector count", round), issued.size(), ex_s.size());
    if (issued.size() == ex_s.size())
      foreach (ex_s[i]) begin
        chk($sformatf("round %0d vec %0d s", round, i), issued[i].s, ex_s[i]);
        chk($sformatf("round %0d vec %0d vlr", round, i), issued_vlr[i], ex_vlr[i]);
        chk($sformatf("round %0d vec %0d vmr", round, i), issued_vmr[i], ex_vmr[i]);
      end
  endtask

  initial begin
    word_t p [32];
    p[0]  = sI(OP_ADDI, 1, 0, 0, 5);
    p[1]  = sI(OP_ADDI, 2, 1, 0, 7);
    p[2]  = sI(OP_ADD,  3, 1, 2, 0);
    p[3]  = sI(OP_SW,   0, 0, 3, 100);
    p[4]  = sI(OP_LW,   4, 0, 0, 100);
    p[5]  = sI(OP_ADD,  5, 4, 4, 0);
    p[6]  = sI(OP_MUL,  6, 5, 1, 0);
    p[7]  = sI(OP_SUB,  7, 6, 3, 0);
    p[8]  = sI(OP_SLT,  8, 3, 6, 0);
    p[9]  = sI(OP_MTS,  0, 1, 0, 0);
    p[10] = vI(VOP_VADDS, 1, 7, 2, 0, 0);
    p[11] = sI(OP_ADDI, 9, 0, 0, 3);
    p[12] = sI(OP_ADDI, 10, 0, 0, 0);
    p[13] = sI(OP_ADD,  10, 10, 9, 0);
    p[14] = sI(OP_ADDI, 9, 9, 0, -1);
    p[15] = sI(OP_BNE,  0, 9, 0, -3);
    p[16] = sI(OP_SW,   0, 0, 10, 101);
    p[17] = sI(OP_JMP,  0, 0, 0, 19);
    p[18] = sI(OP_ADDI, 10, 0, 0, 99);
    p[19] = sI(OP_SW,   0, 0, 10, 102);
    p[20] = vI(VOP_VMULS, 2, 10, 1, 0, 0);
    p[21] = vI(VOP_VLD, 3, 10, 0, 0, 7);
    p[22] = sI(OP_SW,   0, 0, 8, 103);
    p[23] = sI(OP_SLL,  11, 7, 0, 4);
    p[24] = sI(OP_AND,  12, 11, 6, 0);
    p[25] = sI(OP_OR,   13, 12, 1, 0);
    p[26] = sI(OP_SW,   0, 0, 13, 104);
    p[27] = sI(OP_LW,   14, 0, 0, 104);
    p[28] = sI(OP_BEQ,  0, 14, 13, 1);
    p[29] = sI(OP_SW,   0, 0, 0, 104);
    p[30] = sI(OP_HALT, 0, 0, 0, 0);
    p[31] = sI(OP_SW,   0, 0, 0, 105);
    foreach (dm[i]) dm[i] = 32'hFFFF_FFFF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk) begin host_we = 1; host_addr = pc_t'(i); host_wdata = p[i]; end
    end
    @(negedge clk) host_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (halted);
    repeat (3) @(negedge clk);
    chk("M[100]", dm[100], 17);
    chk("M[101]", dm[101], 6);
    chk("M[102]", dm[102], 6);
    chk("M[103]", dm[103], 1);
    chk("M[104]", dm[104], ((153 << 4) & 170) | 5);
    chk("M[105]", dm[105], 32'hFFFF_FFFF);
    chk("vector count", issued.size(), 3);
    if (issued.size() == 3) begin
      chk("v0 op", issued[0].op, VOP_VADDS);
      chk("v0 s", issued[0].s, 153);
      chk("v0 va", issued[0].va, 2);
      chk("v0 vlr", issued_vlr[0], 5);
      chk("v1 op", issued[1].op, VOP_VMULS);
      chk("v1 s", issued[1].s, 6);
      chk("v2 op", issued[2].op, VOP_VLD);
      chk("v2 s", issued[2].s, 6);
      chk("v2 imm", issued[2].imm, 7);
      chk("v2 vd", issued[2].vd, 3);
    end
    chk("running", running, 0);
    $display("events: fwd %0d load-use %0d mts %0d flush %0d vec-wait %0d mem-wait %0d",
             n_fwd, n_lu, n_mts, n_fl, n_vw, n_mw);
    chk("forward seen", n_fwd > 0, 1);
    chk("load-use seen", n_lu > 0, 1);
    chk("mts wait seen", n_mts > 0, 1);
    chk("flushes", n_fl, 4);   // 2 loop back-edges, JMP, BEQ
    chk("mem wait seen", n_mw > 0, 1);
    for (int r = 0; r < 40; r++) random_round(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
