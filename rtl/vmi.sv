// vmi: vector memory interface between the vector register file and the data memory.
//
// All data-memory traffic passes through here: the scalar unit's loads and stores, and
// the vector unit's unit-stride loads/stores (VLD/VST, any start address, any length up
// to VLEN) and indexed loads/stores (VLDX/VSTX, address = base + index element, the
// gather/scatter used for sparse matrices). The data memory is sixteen 512-word banks
// in two groups of eight. A word address is {group, row[8:0], lane[2:0]}, so successive
// words rotate over the eight lanes and a vector access may start at any bank.
//
// A vector access is worked off eight elements (one "group", one element per register
// bank) at a time. Each memory lane serves at most one element per clock: among the
// still-pending elements that address it, the one from the lowest register bank wins.
// Two eight-to-one multiplexer sets - eight choosing, per memory lane, the register
// bank it serves and eight choosing, per register bank, the memory lane it receives
// from (16 eight-to-one 32-bit multiplexers, the original design's crossbar) - move the data.
// A unit-stride access never conflicts and moves eight elements per clock; an indexed
// access takes one clock per group plus one per extra element that hits an already-
// claimed lane, so its time depends on the stored pattern. Elements at or beyond VLR,
// or with their VMR bit clear, are skipped.
//
// Timing: memory reads return one clock after the address. A scalar load's word is on
// `s_rdata` in the clock after `s_req`. A vector command is taken when `cmd_valid` is
// high while `busy` is low; `busy` is high from the next clock until the last element
// has been written to memory or to the register file. The scalar unit must not
// request while `busy` is high. Bank grouping by address and the lowest-bank-first
// arbitration are this design's choices; the original design gives only what the VMI supports.
module vmi
  import vp_pkg::*;
#(
  parameter int unsigned VLEN  = 32,
  parameter int unsigned NVREG = 8,
  parameter int unsigned RAW   = $clog2(NVREG * VLEN / LANES),
  parameter int unsigned VLR_W = $clog2(VLEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // scalar port
  input  logic             s_req,
  input  logic             s_we,
  input  daddr_t           s_addr,
  input  word_t            s_wdata,
  output word_t            s_rdata,
  // vector command
  input  logic             cmd_valid,
  input  vmop_e            cmd_op,
  input  logic [2:0]       cmd_reg,    // data register (destination of loads, source of stores)
  input  logic [2:0]       cmd_idx,    // index register of VLDX/VSTX
  input  daddr_t           cmd_base,
  input  logic [VLR_W-1:0] cmd_vlr,
  input  logic [VLEN-1:0]  cmd_vmr,
  output logic             busy,
  output logic             conflict,   // a group needed another clock because of a lane conflict
  // vector register file ports
  output logic [RAW-1:0]   rf_ra0 [LANES],
  input  word_t            rf_rd0 [LANES],
  output logic [RAW-1:0]   rf_ra1 [LANES],
  input  word_t            rf_rd1 [LANES],
  output logic             rf_we  [LANES],
  output logic [RAW-1:0]   rf_wa  [LANES],
  output word_t            rf_wd  [LANES],
  // data memory banks, port A
  output logic             m_en    [DGROUPS][LANES],
  output logic             m_we    [DGROUPS][LANES],
  output logic [DROW_W-1:0] m_addr [DGROUPS][LANES],
  output word_t            m_wdata [DGROUPS][LANES],
  input  word_t            m_rdata [DGROUPS][LANES]
);
  localparam int unsigned RPR = VLEN / LANES;          // rows (groups) per register
  localparam int unsigned GW  = $clog2(RPR) + 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state_q;

  vmop_e            op_q;
  logic [2:0]       reg_q, idx_q;
  daddr_t           base_q;
  logic [VLR_W-1:0] vlr_q;
  logic [VLEN-1:0]  vmr_q;
  logic [GW-1:0]    g_q;
  logic [LANES-1:0] pend_q;

  // load return pipeline
  logic [LANES-1:0]  ldv_q;
  logic [LANE_W-1:0] ldlane_q [LANES];
  logic [RAW-1:0]    ldrow_q;
  logic              lgrp_q [LANES];    // group read by each memory lane
  logic              sgrp_q;
  logic [LANE_W-1:0] slane_q;

  function automatic logic [LANES-1:0] group_mask(int unsigned g, logic [VLR_W-1:0] fvlr,
                                                  logic [VLEN-1:0] fvmr);
    logic [LANES-1:0] m;
    for (int unsigned k = 0; k < LANES; k++) begin
      int unsigned e;
      e = g * LANES + k;
      m[k] = (e < VLEN) && (e < 32'(fvlr)) && fvmr[e % VLEN];
    end
    return m;
  endfunction

  // ---------------- per-element addresses and lane arbitration ----------------
  daddr_t            ea      [LANES];
  logic [LANE_W-1:0] elane   [LANES];
  logic [LANES-1:0]  granted;
  logic              is_idx, is_load;

  assign is_idx  = (op_q == VM_LDX) || (op_q == VM_STX);
  assign is_load = (op_q == VM_LD)  || (op_q == VM_LDX);

  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) begin
      if (is_idx) ea[k] = base_q + rf_rd1[k][DADDR_W-1:0];
      else        ea[k] = base_q + DADDR_W'(32'(g_q) * LANES + k);
      elane[k] = ea[k][LANE_W-1:0];
    end
    for (int unsigned k = 0; k < LANES; k++) begin
      granted[k] = (state_q == S_RUN) && pend_q[k];
      for (int unsigned j = 0; j < k; j++)
        if (pend_q[j] && elane[j] == elane[k]) granted[k] = 1'b0;
    end
  end

  // register file read addresses: data register and index register, current group
  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) begin
      rf_ra0[k] = RAW'(32'(reg_q) * RPR + 32'(g_q));
      rf_ra1[k] = RAW'(32'(idx_q) * RPR + 32'(g_q));
    end
  end

  // memory side: per lane, an eight-to-one choice of the register bank served
  always_comb begin
    for (int unsigned gr = 0; gr < DGROUPS; gr++)
      for (int unsigned m = 0; m < LANES; m++) begin
        m_en[gr][m]    = 1'b0;
        m_we[gr][m]    = 1'b0;
        m_addr[gr][m]  = s_addr[DADDR_W-2:LANE_W];
        m_wdata[gr][m] = s_wdata;
      end
    if (state_q == S_RUN) begin
      for (int unsigned k = 0; k < LANES; k++) begin
        if (granted[k]) begin
          m_en  [ea[k][DADDR_W-1]][elane[k]] = 1'b1;
          m_we  [ea[k][DADDR_W-1]][elane[k]] = !is_load;
          m_addr[ea[k][DADDR_W-1]][elane[k]] = ea[k][DADDR_W-2:LANE_W];
          m_wdata[ea[k][DADDR_W-1]][elane[k]] = rf_rd0[k];
        end
      end
    end else if (s_req) begin
      m_en[s_addr[DADDR_W-1]][s_addr[LANE_W-1:0]] = 1'b1;
      m_we[s_addr[DADDR_W-1]][s_addr[LANE_W-1:0]] = s_we;
    end
  end

  // register side: per bank, an eight-to-one choice of the memory lane received from
  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) begin
      rf_we[k] = ldv_q[k];
      rf_wa[k] = ldrow_q;
      rf_wd[k] = m_rdata[lgrp_q[ldlane_q[k]]][ldlane_q[k]];
    end
  end

  assign s_rdata  = m_rdata[sgrp_q][slane_q];
  assign busy     = (state_q != S_IDLE);
  assign conflict = (state_q == S_RUN) && ((pend_q & ~granted) != '0);

  // ---------------- sequencing ----------------
  logic [LANES-1:0] pend_left;
  assign pend_left = pend_q & ~granted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      op_q    <= VM_LD;
      reg_q   <= '0;
      idx_q   <= '0;
      base_q  <= '0;
      vlr_q   <= '0;
      vmr_q   <= '0;
      g_q     <= '0;
      pend_q  <= '0;
      ldv_q   <= '0;
      ldrow_q <= '0;
      sgrp_q  <= 1'b0;
      slane_q <= '0;
      for (int unsigned k = 0; k < LANES; k++) begin
        ldlane_q[k] <= '0;
        lgrp_q[k]   <= 1'b0;
      end
    end else begin
      a_no_scalar_while_busy: assert (!(s_req && busy))
        else $error("vmi: scalar request while a vector access is running");
      ldv_q <= '0;
      if (s_req && state_q == S_IDLE) begin
        sgrp_q  <= s_addr[DADDR_W-1];
        slane_q <= s_addr[LANE_W-1:0];
      end
      unique case (state_q)
        S_IDLE: begin
          if (cmd_valid && cmd_vlr != '0) begin
            state_q <= S_RUN;
            op_q    <= cmd_op;
            reg_q   <= cmd_reg;
            idx_q   <= cmd_idx;
            base_q  <= cmd_base;
            vlr_q   <= cmd_vlr;
            vmr_q   <= cmd_vmr;
            g_q     <= '0;
            pend_q  <= group_mask(0, cmd_vlr, cmd_vmr);
          end
        end
        S_RUN: begin
          if (is_load) begin
            ldv_q   <= granted;
            ldrow_q <= RAW'(32'(reg_q) * RPR + 32'(g_q));
            for (int unsigned k = 0; k < LANES; k++) begin
              ldlane_q[k] <= elane[k];
              if (granted[k]) lgrp_q[elane[k]] <= ea[k][DADDR_W-1];
            end
          end
          if (pend_left != '0) begin
            pend_q <= pend_left;
          end else if ((32'(g_q) + 1) * LANES >= 32'(vlr_q)) begin
            pend_q  <= '0;
            state_q <= is_load ? S_DRAIN : S_IDLE;
          end else begin
            g_q    <= g_q + 1'b1;
            pend_q <= group_mask(32'(g_q) + 1, vlr_q, vmr_q);
          end
        end
        default: state_q <= S_IDLE;   // S_DRAIN: last load data written this clock
      endcase
    end
  end

endmodule
