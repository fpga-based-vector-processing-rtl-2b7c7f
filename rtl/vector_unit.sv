// vector_unit: the vector core - eight lanes around the banked vector register file.
//
// Each lane k owns register bank k, one floating-point adder and one floating-point
// multiplier, and a path into the memory crossbar. The unit takes one vector
// instruction at a time from the scalar unit (`issue_valid` while `issue_ready`), with
// the current VLR and VMR, and works it off eight elements per clock:
//   VADD/VSUB/VADDS  element pairs go to the eight adders (VSUB flips the sign of the
//                    second operand, VADDS uses the scalar operand for every element)
//   VMUL/VMULS       likewise to the eight multipliers
//   VLD/VST/VLDX/VSTX handed to the vector memory interface (vmi), base = s + imm
// Results come back FADD_LAT / FMUL_LAT clocks after their operands and are written to
// the destination register's banks; elements at or beyond VLR or with a clear VMR bit
// are not written. The two read ports and one write port of every bank are shared in
// time between the FP units and the memory interface: whichever is running the
// current instruction owns them. `busy` stays high until the last result is written,
// and only then is the next vector instruction taken (no chaining, no overlap).
//
// The floating-point units are external IP cores (IEEE 754 single precision). Their
// operand and result ports are brought out per lane; they must be fixed-latency
// pipelines accepting one operation per clock. The lane structure, the eight results
// per clock and the time-shared register ports follow the original design; the one-at-a-time
// issue and the FP latencies are this design's choices.
module vector_unit
  import vp_pkg::*;
#(
  parameter int unsigned VLEN     = 32,
  parameter int unsigned NVREG    = 8,
  parameter int unsigned FADD_LAT = 4,
  parameter int unsigned FMUL_LAT = 3,
  parameter int unsigned VLR_W    = $clog2(VLEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // instruction issue from the scalar unit
  input  logic             issue_valid,
  input  vinstr_t          issue,
  input  logic [VLR_W-1:0] vlr,
  input  logic [VLEN-1:0]  vmr,
  output logic             issue_ready,
  output logic             busy,
  output logic             vmi_busy,
  // scalar data memory port
  input  logic             s_req,
  input  logic             s_we,
  input  daddr_t           s_addr,
  input  word_t            s_wdata,
  output word_t            s_rdata,
  // floating-point units, one adder and one multiplier per lane
  output word_t            fadd_a [LANES],
  output word_t            fadd_b [LANES],
  input  word_t            fadd_y [LANES],
  output word_t            fmul_a [LANES],
  output word_t            fmul_b [LANES],
  input  word_t            fmul_y [LANES],
  // data memory banks, port A
  output logic             m_en    [DGROUPS][LANES],
  output logic             m_we    [DGROUPS][LANES],
  output logic [DROW_W-1:0] m_addr [DGROUPS][LANES],
  output word_t            m_wdata [DGROUPS][LANES],
  input  word_t            m_rdata [DGROUPS][LANES],
  // event flag for performance counting
  output logic             mem_conflict
);
  localparam int unsigned RPR = VLEN / LANES;
  localparam int unsigned RAW = $clog2(NVREG * RPR);
  localparam int unsigned GW  = $clog2(RPR) + 1;

  // ---------------- register file and its port sharing ----------------
  logic [RAW-1:0] ra0 [LANES], ra1 [LANES], wa [LANES];
  word_t          rd0 [LANES], rd1 [LANES], wd [LANES];
  logic           we  [LANES];

  logic [RAW-1:0] m_ra0 [LANES], m_ra1 [LANES], m_wa [LANES];
  word_t          m_wd  [LANES];
  logic           m_we_rf [LANES];
  logic [RAW-1:0] a_ra0 [LANES], a_ra1 [LANES], a_wa [LANES];
  word_t          a_wd  [LANES];
  logic           a_we  [LANES];

  vector_regfile #(.NVREG(NVREG), .VLEN(VLEN), .LANES(LANES)) u_vrf (
    .clk, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd
  );

  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) begin
      ra0[k] = vmi_busy ? m_ra0[k]   : a_ra0[k];
      ra1[k] = vmi_busy ? m_ra1[k]   : a_ra1[k];
      we[k]  = vmi_busy ? m_we_rf[k] : a_we[k];
      wa[k]  = vmi_busy ? m_wa[k]    : a_wa[k];
      wd[k]  = vmi_busy ? m_wd[k]    : a_wd[k];
    end
  end

  // ---------------- issue ----------------
  typedef enum logic [1:0] {A_IDLE, A_ISSUE, A_DRAIN} astate_e;
  astate_e astate_q;
  logic    accept, accept_mem, accept_ar;

  assign issue_ready = (astate_q == A_IDLE) && !vmi_busy;
  assign accept      = issue_valid && issue_ready;
  assign accept_mem  = accept && is_vmem(issue.op);
  assign accept_ar   = accept && is_varith(issue.op);
  assign busy        = (astate_q != A_IDLE) || vmi_busy;

  // ---------------- memory instructions ----------------
  vmop_e vm_op;
  always_comb begin
    unique case (issue.op)
      VOP_VST:  vm_op = VM_ST;
      VOP_VLDX: vm_op = VM_LDX;
      VOP_VSTX: vm_op = VM_STX;
      default:  vm_op = VM_LD;
    endcase
  end

  vmi #(.VLEN(VLEN), .NVREG(NVREG)) u_vmi (
    .clk, .rst_n,
    .s_req, .s_we, .s_addr, .s_wdata, .s_rdata,
    .cmd_valid (accept_mem),
    .cmd_op    (vm_op),
    .cmd_reg   (issue.vd),
    .cmd_idx   (issue.vb),
    .cmd_base  (issue.s[DADDR_W-1:0] + issue.imm),
    .cmd_vlr   (vlr),
    .cmd_vmr   (vmr),
    .busy      (vmi_busy),
    .conflict  (mem_conflict),
    .rf_ra0    (m_ra0), .rf_rd0 (rd0), .rf_ra1 (m_ra1), .rf_rd1 (rd1),
    .rf_we     (m_we_rf), .rf_wa (m_wa), .rf_wd (m_wd),
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata
  );

  // ---------------- arithmetic instructions ----------------
  vop_e             op_q;
  logic [2:0]       vd_q, va_q, vb_q;
  word_t            s_q;
  logic [VLR_W-1:0] vlr_q;
  logic [VLEN-1:0]  vmr_q;
  logic [GW-1:0]    g_q;
  logic             is_mul;

  assign is_mul = (op_q == VOP_VMUL) || (op_q == VOP_VMULS);

  // tags travelling alongside the FP pipelines: element enables and destination row
  logic [LANES-1:0] addv_q [FADD_LAT];
  logic [RAW-1:0]   addr_q [FADD_LAT];
  logic [LANES-1:0] mulv_q [FMUL_LAT];
  logic [RAW-1:0]   mulr_q [FMUL_LAT];
  logic [LANES-1:0] push_v;
  logic [RAW-1:0]   push_row;
  logic             pipes_busy;

  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) begin
      int unsigned e;
      e = 32'(g_q) * LANES + k;
      push_v[k] = (astate_q == A_ISSUE) && (e < 32'(vlr_q)) && vmr_q[e % VLEN];
      a_ra0[k] = RAW'(32'(va_q) * RPR + 32'(g_q));
      a_ra1[k] = RAW'(32'(vb_q) * RPR + 32'(g_q));
      fadd_a[k] = rd0[k];
      fmul_a[k] = rd0[k];
      unique case (op_q)
        VOP_VSUB:  fadd_b[k] = {~rd1[k][31], rd1[k][30:0]};
        VOP_VADDS: fadd_b[k] = s_q;
        default:   fadd_b[k] = rd1[k];
      endcase
      fmul_b[k] = (op_q == VOP_VMULS) ? s_q : rd1[k];
    end
    push_row = RAW'(32'(vd_q) * RPR + 32'(g_q));
  end

  always_comb begin
    pipes_busy = 1'b0;
    for (int unsigned i = 0; i < FADD_LAT; i++) pipes_busy |= (addv_q[i] != '0);
    for (int unsigned i = 0; i < FMUL_LAT; i++) pipes_busy |= (mulv_q[i] != '0);
  end

  // write-back: the pipelines never hold results of two instructions at once
  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) begin
      if (mulv_q[FMUL_LAT-1][k]) begin
        a_we[k] = 1'b1;
        a_wa[k] = mulr_q[FMUL_LAT-1];
        a_wd[k] = fmul_y[k];
      end else begin
        a_we[k] = addv_q[FADD_LAT-1][k];
        a_wa[k] = addr_q[FADD_LAT-1];
        a_wd[k] = fadd_y[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      astate_q <= A_IDLE;
      op_q  <= VOP_VADD;
      vd_q  <= '0;
      va_q  <= '0;
      vb_q  <= '0;
      s_q   <= '0;
      vlr_q <= '0;
      vmr_q <= '0;
      g_q   <= '0;
      for (int unsigned i = 0; i < FADD_LAT; i++) begin
        addv_q[i] <= '0;
        addr_q[i] <= '0;
      end
      for (int unsigned i = 0; i < FMUL_LAT; i++) begin
        mulv_q[i] <= '0;
        mulr_q[i] <= '0;
      end
    end else begin
      // FP tag pipelines
      addv_q[0] <= (astate_q == A_ISSUE && !is_mul) ? push_v : '0;
      addr_q[0] <= push_row;
      mulv_q[0] <= (astate_q == A_ISSUE &&  is_mul) ? push_v : '0;
      mulr_q[0] <= push_row;
      for (int unsigned i = 1; i < FADD_LAT; i++) begin
        addv_q[i] <= addv_q[i-1];
        addr_q[i] <= addr_q[i-1];
      end
      for (int unsigned i = 1; i < FMUL_LAT; i++) begin
        mulv_q[i] <= mulv_q[i-1];
        mulr_q[i] <= mulr_q[i-1];
      end

      unique case (astate_q)
        A_IDLE: begin
          if (accept_ar && vlr != '0) begin
            astate_q <= A_ISSUE;
            op_q  <= issue.op;
            vd_q  <= issue.vd;
            va_q  <= issue.va;
            vb_q  <= issue.vb;
            s_q   <= issue.s;
            vlr_q <= vlr;
            vmr_q <= vmr;
            g_q   <= '0;
          end
        end
        A_ISSUE: begin
          if ((32'(g_q) + 1) * LANES >= 32'(vlr_q)) astate_q <= A_DRAIN;
          else g_q <= g_q + 1'b1;
        end
        default: begin  // A_DRAIN
          if (!pipes_busy) astate_q <= A_IDLE;
        end
      endcase
    end
  end
endmodule
