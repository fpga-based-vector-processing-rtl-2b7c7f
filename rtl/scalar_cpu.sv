// scalar_cpu: five-stage pipelined RISC scalar unit (fetch, decode, execute, memory
// access, write back) that also feeds the vector unit.
//
// The unit fetches and decodes every instruction. Scalar instructions run through the
// pipeline; a vector instruction (bit 31 set) is handed to the vector unit from the
// execute stage, together with the forwarded value of its scalar register rs and the
// VLR/VMR values read in decode, and then leaves the pipeline as a bubble. Loads and
// stores go through the vector memory interface in the memory-access stage; the
// loaded word arrives in write-back.
//
// Hazards are all handled in hardware: a forwarding unit feeds execute from EX/MEM and
// MEM/WB, a hazard unit holds decode for one clock on a load-use dependence and while
// a move to VLR/VMR is ahead of a vector instruction, execute waits while the vector
// unit is still busy with the previous vector instruction, and memory access waits
// while the memory interface runs a vector load/store. Branches (BEQ/BNE, target
// pc+1+imm) and JMP resolve in execute; the two younger instructions are squashed. A
// taken branch overrides a decode stall, since the stalled instruction is squashed anyway.
//
// Control: `start` (one clock) clears the pipeline, sets pc to 0 and starts fetching.
// Fetch stops once HALT has been decoded; `halted` rises when HALT reaches write-back.
// The instruction memory is read synchronously: `imem_addr` is sampled when `imem_en`
// is high and the word arrives in the next clock (the fetch register).
// The five stages, the forwarding and hazard units, VLR/VMR in the register file and
// the vector hand-off follow the original design; the ISA and all timing details are this
// design's own.
module scalar_cpu
  import vp_pkg::*;
#(
  parameter int unsigned VLEN  = 32,
  parameter int unsigned VLR_W = $clog2(VLEN + 1),
  parameter int unsigned NCHUNK = (VLEN + 31) / 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             running,
  output logic             halted,
  // instruction memory
  output logic             imem_en,
  output pc_t              imem_addr,
  input  word_t            imem_rdata,
  // vector unit
  output logic             v_valid,
  output vinstr_t          v_instr,
  output logic [VLR_W-1:0] v_vlr,
  output logic [VLEN-1:0]  v_vmr,
  input  logic             v_ready,
  // data memory through the vector memory interface
  output logic             d_req,
  output logic             d_we,
  output daddr_t           d_addr,
  output word_t            d_wdata,
  input  word_t            d_rdata,
  input  logic             vmi_busy,
  // events, for performance counters and tests
  output logic             ev_forward,
  output logic             ev_load_use,
  output logic             ev_mts_wait,
  output logic             ev_flush,
  output logic             ev_vec_wait,
  output logic             ev_mem_wait
);
  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic        valid;
    pc_t         pc;
    logic        is_vec;
    logic [3:0]  op;
    logic [3:0]  rd, rs, rt;
    word_t       a, b;
    word_t       imm;
    logic        regwrite, is_load, is_store, is_mts, is_halt;
  } idex_t;

  typedef struct packed {
    logic        valid;
    word_t       y;
    word_t       sdata;
    logic [3:0]  rd;
    word_t       imm;
    logic        regwrite, is_load, is_store, is_mts, is_halt;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    word_t       y;
    logic [3:0]  rd;
    word_t       imm;
    logic        regwrite, is_load, is_mts, is_halt;
  } memwb_t;

  pc_t              pc_q;
  logic             ifid_valid_q, halt_seen_q;
  pc_t              ifid_pc_q;
  idex_t            idex_q;
  logic [VLR_W-1:0] idex_vlr_q;
  logic [VLEN-1:0]  idex_vmr_q;
  exmem_t           exmem_q;
  memwb_t           memwb_q;

  // ---------------- decode ----------------
  word_t      ir;
  logic       id_valid, id_is_vec, id_use_rs, id_use_rt;
  sop_e       id_op;
  logic [3:0] id_rd, id_rs, id_rt;
  word_t      id_imm, rf_a, rf_b;
  logic       id_regwrite;

  assign ir        = imem_rdata;
  assign id_valid  = ifid_valid_q;
  assign id_is_vec = ir[31];
  assign id_op     = sop_e'(ir[30:27]);
  assign id_rd     = ir[26:23];
  assign id_rs     = ir[22:19];
  assign id_rt     = ir[18:15];
  assign id_imm    = id_is_vec ? {19'd0, ir[12:0]} : {{17{ir[14]}}, ir[14:0]};

  always_comb begin
    id_use_rs   = 1'b1;
    id_use_rt   = 1'b0;
    id_regwrite = 1'b0;
    if (!id_is_vec) begin
      unique case (id_op)
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_MUL, OP_SLT: begin
          id_use_rt = 1'b1; id_regwrite = 1'b1;
        end
        OP_SLL, OP_ADDI, OP_LW:       id_regwrite = 1'b1;
        OP_SW, OP_BEQ, OP_BNE:        id_use_rt = 1'b1;
        OP_NOP, OP_JMP, OP_HALT:      id_use_rs = 1'b0;
        default: ;                    // OP_MTS
      endcase
    end
  end

  // ---------------- register file, hazards, forwarding ----------------
  logic       wb_we, wb_vlr_we, wb_vmr_we;
  word_t      wb_wd;
  logic [VLR_W-1:0] rf_vlr;
  logic [VLEN-1:0]  rf_vmr;

  scalar_regfile #(.VLEN(VLEN)) u_rf (
    .clk, .rst_n,
    .ra1(id_rs), .rd1(rf_a), .ra2(id_rt), .rd2(rf_b),
    .we(wb_we), .wa(memwb_q.rd), .wd(wb_wd),
    .vlr_we(wb_vlr_we), .vmr_we(wb_vmr_we),
    .vmr_sel(($clog2(NCHUNK+1))'(memwb_q.imm)), .vwd(memwb_q.y),
    .vlr(rf_vlr), .vmr(rf_vmr)
  );

  logic stall_id, load_use, mts_wait;
  hazard_unit u_hz (
    .id_valid, .id_use_rs, .id_use_rt, .id_rs, .id_rt, .id_is_vec,
    .ex_valid(idex_q.valid), .ex_is_load(idex_q.is_load), .ex_rd(idex_q.rd),
    .ex_is_mts(idex_q.is_mts),
    .mem_valid(exmem_q.valid), .mem_is_mts(exmem_q.is_mts),
    .stall_id, .load_use, .mts_wait
  );

  logic [1:0] sel_a, sel_b;
  forwarding_unit u_fw (
    .ex_rs(idex_q.rs), .ex_rt(idex_q.rt),
    .mem_wr(exmem_q.valid && exmem_q.regwrite), .mem_is_load(exmem_q.is_load),
    .mem_rd(exmem_q.rd),
    .wb_wr(memwb_q.valid && memwb_q.regwrite), .wb_rd(memwb_q.rd),
    .sel_a, .sel_b
  );

  // ---------------- execute ----------------
  word_t a_fwd, b_fwd, alu_b, alu_y, ex_y;
  logic  alu_eq, ex_taken;
  pc_t   ex_target;
  sop_e  ex_op;

  assign ex_op = sop_e'(idex_q.op);

  always_comb begin
    unique case (sel_a)
      2'd1:    a_fwd = exmem_q.y;
      2'd2:    a_fwd = wb_wd;
      default: a_fwd = idex_q.a;
    endcase
    unique case (sel_b)
      2'd1:    b_fwd = exmem_q.y;
      2'd2:    b_fwd = wb_wd;
      default: b_fwd = idex_q.b;
    endcase
    alu_b = (ex_op inside {OP_ADDI, OP_LW, OP_SW}) ? idex_q.imm : b_fwd;
  end

  scalar_alu u_alu (
    .op(ex_op), .a(a_fwd), .b(alu_b), .shamt(idex_q.imm[4:0]), .y(alu_y), .eq(alu_eq)
  );

  assign ex_y = (ex_op == OP_MTS) ? a_fwd : alu_y;

  always_comb begin
    ex_taken  = 1'b0;
    ex_target = idex_q.pc + 1'b1 + pc_t'(idex_q.imm);
    if (idex_q.valid && !idex_q.is_vec) begin
      unique case (ex_op)
        OP_BEQ: ex_taken = alu_eq;
        OP_BNE: ex_taken = !alu_eq;
        OP_JMP: begin ex_taken = 1'b1; ex_target = pc_t'(idex_q.imm); end
        default: ;
      endcase
    end
  end

  // ---------------- stalls ----------------
  logic stall_mem, stall_ex, freeze_ex, freeze_id, flush;
  assign stall_mem = exmem_q.valid && (exmem_q.is_load || exmem_q.is_store) && vmi_busy;
  assign stall_ex  = idex_q.valid && idex_q.is_vec && !v_ready;
  assign freeze_ex = stall_mem || stall_ex;
  assign flush     = ex_taken && !stall_mem;
  // a taken branch squashes the instruction in decode, so its stall no longer applies
  assign freeze_id = freeze_ex || (stall_id && !flush);

  // vector hand-off
  assign v_valid = idex_q.valid && idex_q.is_vec && !stall_mem;
  always_comb begin
    v_instr.op  = vop_e'(idex_q.op);
    v_instr.vd  = idex_q.rd[2:0];
    v_instr.va  = idex_q.imm[18:16];
    v_instr.vb  = idex_q.imm[15:13];
    v_instr.imm = idex_q.imm[12:0];
    v_instr.s   = a_fwd;
  end
  assign v_vlr = idex_vlr_q;
  assign v_vmr = idex_vmr_q;

  // ---------------- memory access and write back ----------------
  assign d_req   = exmem_q.valid && (exmem_q.is_load || exmem_q.is_store) && !vmi_busy;
  assign d_we    = exmem_q.is_store;
  assign d_addr  = exmem_q.y[DADDR_W-1:0];
  assign d_wdata = exmem_q.sdata;

  assign wb_wd     = memwb_q.is_load ? d_rdata : memwb_q.y;
  assign wb_we     = memwb_q.valid && memwb_q.regwrite;
  assign wb_vlr_we = memwb_q.valid && memwb_q.is_mts && memwb_q.rd == 4'd0;
  assign wb_vmr_we = memwb_q.valid && memwb_q.is_mts && memwb_q.rd == 4'd1;

  assign imem_en   = !freeze_id;
  assign imem_addr = pc_q;

  // ---------------- pipeline advance ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      halted       <= 1'b0;
      pc_q         <= '0;
      ifid_valid_q <= 1'b0;
      ifid_pc_q    <= '0;
      halt_seen_q  <= 1'b0;
      idex_q       <= '0;
      idex_vlr_q   <= '0;
      idex_vmr_q   <= '0;
      exmem_q      <= '0;
      memwb_q      <= '0;
    end else if (start) begin
      running      <= 1'b1;
      halted       <= 1'b0;
      pc_q         <= '0;
      ifid_valid_q <= 1'b0;
      halt_seen_q  <= 1'b0;
      idex_q.valid <= 1'b0;
      exmem_q.valid <= 1'b0;
      memwb_q.valid <= 1'b0;
    end else begin
      // write back
      if (memwb_q.valid && memwb_q.is_halt) begin
        halted  <= 1'b1;
        running <= 1'b0;
      end
      // MEM -> WB
      if (!stall_mem) begin
        memwb_q.valid    <= exmem_q.valid;
        memwb_q.y        <= exmem_q.y;
        memwb_q.rd       <= exmem_q.rd;
        memwb_q.imm      <= exmem_q.imm;
        memwb_q.regwrite <= exmem_q.regwrite;
        memwb_q.is_load  <= exmem_q.is_load;
        memwb_q.is_mts   <= exmem_q.is_mts;
        memwb_q.is_halt  <= exmem_q.is_halt;
      end else begin
        memwb_q.valid <= 1'b0;
      end
      // EX -> MEM
      if (!freeze_ex) begin
        exmem_q.valid    <= idex_q.valid && !idex_q.is_vec;
        exmem_q.y        <= ex_y;
        exmem_q.sdata    <= b_fwd;
        exmem_q.rd       <= idex_q.rd;
        exmem_q.imm      <= idex_q.imm;
        exmem_q.regwrite <= idex_q.regwrite;
        exmem_q.is_load  <= idex_q.is_load;
        exmem_q.is_store <= idex_q.is_store;
        exmem_q.is_mts   <= idex_q.is_mts;
        exmem_q.is_halt  <= idex_q.is_halt;
      end else if (!stall_mem) begin
        exmem_q.valid <= 1'b0;
      end
      // ID -> EX
      if (!freeze_id) begin
        idex_q.valid    <= id_valid && !flush;
        idex_q.pc       <= ifid_pc_q;
        idex_q.is_vec   <= id_is_vec;
        idex_q.op       <= ir[30:27];
        idex_q.rd       <= id_rd;
        idex_q.rs       <= id_use_rs ? id_rs : 4'd0;
        idex_q.rt       <= id_use_rt ? id_rt : 4'd0;
        idex_q.a        <= rf_a;
        idex_q.b        <= rf_b;
        idex_q.imm      <= id_is_vec ? {13'd0, ir[18:0]} : id_imm;
        idex_q.regwrite <= id_regwrite;
        idex_q.is_load  <= !id_is_vec && id_op == OP_LW;
        idex_q.is_store <= !id_is_vec && id_op == OP_SW;
        idex_q.is_mts   <= !id_is_vec && id_op == OP_MTS;
        idex_q.is_halt  <= !id_is_vec && id_op == OP_HALT;
        idex_vlr_q      <= rf_vlr;
        idex_vmr_q      <= rf_vmr;
      end else begin
        if (!freeze_ex) idex_q.valid <= 1'b0;       // bubble behind a decode stall
        else begin                                  // execute waits: keep operands current
          idex_q.a <= a_fwd;
          idex_q.b <= b_fwd;
        end
      end
      // IF -> ID
      if (!freeze_id) begin
        ifid_valid_q <= running && !flush && !halt_seen_q &&
                        !(id_valid && !id_is_vec && id_op == OP_HALT);
        ifid_pc_q    <= pc_q;
        if (flush)                        pc_q <= ex_target;
        else if (running && !halt_seen_q) pc_q <= pc_q + 1'b1;
        if (id_valid && !flush && !id_is_vec && id_op == OP_HALT) halt_seen_q <= 1'b1;
      end
    end
  end

  assign ev_forward  = idex_q.valid && !freeze_ex && (sel_a != 2'd0 || sel_b != 2'd0);
  assign ev_load_use = load_use && !freeze_ex;
  assign ev_mts_wait = mts_wait && !freeze_ex && !flush;
  assign ev_flush    = flush;
  assign ev_vec_wait = stall_ex && !stall_mem;
  assign ev_mem_wait = stall_mem;
endmodule
