// vector_processor: FPGA vector processor for sparse and dense matrix work - top level.
//
// A five-stage pipelined scalar RISC unit fetches from a 256x32 instruction memory,
// runs scalar instructions itself and passes vector instructions to an eight-lane
// vector unit. The vector unit holds eight vector registers of VLEN 32-bit elements in
// eight register banks, one per lane, with a floating-point adder and multiplier per
// lane, and reaches sixteen 512x32 data memory banks (two groups of eight) through the
// vector memory interface, which also serves the scalar unit's loads and stores.
// Up to eight FP results and eight memory words move per clock.
//
// Host side: the host writes the program (`host_imem_*`) and the data memories
// (`host_dmem_*`, read data one clock after the address) while the processor is idle,
// pulses `start`, waits for `done` (HALT has retired and the vector unit is idle) and
// reads the results back. `events` flags, one clock each, the pipeline and memory
// events that cost time (see vp_pkg::vp_events_t). The floating-point units are IP cores outside this RTL: each
// lane's adder operands leave on `fadd_a/fadd_b` and its sum must return on `fadd_y`
// exactly FADD_LAT clocks later (FMUL_LAT for the multipliers `fmul_*`).
// The block structure follows the original design's block diagram; the host port and the
// FP latencies are this design's choices.
module vector_processor
  import vp_pkg::*;
#(
  parameter int unsigned VLEN     = 32,
  parameter int unsigned NVREG    = 8,
  parameter int unsigned FADD_LAT = 4,
  parameter int unsigned FMUL_LAT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         done,
  output logic         busy,
  output vp_events_t   events,
  // host access to the memories
  input  logic         host_imem_we,
  input  pc_t          host_imem_addr,
  input  word_t        host_imem_wdata,
  input  logic         host_dmem_en,
  input  logic         host_dmem_we,
  input  daddr_t       host_dmem_addr,
  input  word_t        host_dmem_wdata,
  output word_t        host_dmem_rdata,
  // floating-point IP cores, per lane
  output word_t        fadd_a [LANES],
  output word_t        fadd_b [LANES],
  input  word_t        fadd_y [LANES],
  output word_t        fmul_a [LANES],
  output word_t        fmul_b [LANES],
  input  word_t        fmul_y [LANES]
);
  localparam int unsigned VLR_W = $clog2(VLEN + 1);

  // instruction memory
  logic  imem_en;
  pc_t   imem_addr;
  word_t imem_rdata;

  imem #(.DEPTH(1 << PC_W)) u_imem (
    .clk, .en(imem_en), .addr(imem_addr), .rdata(imem_rdata),
    .host_we(host_imem_we), .host_addr(host_imem_addr), .host_wdata(host_imem_wdata)
  );

  // scalar unit
  logic             running, halted;
  logic             v_valid, v_ready, v_busy, vmi_busy;
  vinstr_t          v_instr;
  logic [VLR_W-1:0] v_vlr;
  logic [VLEN-1:0]  v_vmr;
  logic             d_req, d_we;
  daddr_t           d_addr;
  word_t            d_wdata, d_rdata;
  logic             ev_forward, ev_load_use, ev_mts_wait, ev_flush, ev_vec_wait, ev_mem_wait;
  logic             ev_mem_conflict;

  scalar_cpu #(.VLEN(VLEN)) u_cpu (
    .clk, .rst_n, .start, .running, .halted,
    .imem_en, .imem_addr, .imem_rdata,
    .v_valid, .v_instr, .v_vlr, .v_vmr, .v_ready,
    .d_req, .d_we, .d_addr, .d_wdata, .d_rdata, .vmi_busy,
    .ev_forward, .ev_load_use, .ev_mts_wait, .ev_flush, .ev_vec_wait, .ev_mem_wait
  );

  // vector unit
  logic             m_en    [DGROUPS][LANES];
  logic             m_we    [DGROUPS][LANES];
  logic [DROW_W-1:0] m_addr [DGROUPS][LANES];
  word_t            m_wdata [DGROUPS][LANES];
  word_t            m_rdata [DGROUPS][LANES];

  vector_unit #(.VLEN(VLEN), .NVREG(NVREG), .FADD_LAT(FADD_LAT), .FMUL_LAT(FMUL_LAT)) u_vu (
    .clk, .rst_n,
    .issue_valid(v_valid), .issue(v_instr), .vlr(v_vlr), .vmr(v_vmr),
    .issue_ready(v_ready), .busy(v_busy), .vmi_busy,
    .s_req(d_req), .s_we(d_we), .s_addr(d_addr), .s_wdata(d_wdata), .s_rdata(d_rdata),
    .fadd_a, .fadd_b, .fadd_y, .fmul_a, .fmul_b, .fmul_y,
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata,
    .mem_conflict(ev_mem_conflict)
  );

  // data memory: 2 groups x 8 banks; port B is the host's
  word_t             h_rdata [DGROUPS][LANES];
  logic              h_grp_q;
  logic [LANE_W-1:0] h_lane_q;

  for (genvar gr = 0; gr < DGROUPS; gr++) begin : g_grp
    for (genvar m = 0; m < LANES; m++) begin : g_bank
      logic h_sel;
      assign h_sel = host_dmem_en && host_dmem_addr[DADDR_W-1] == gr[0] &&
                     host_dmem_addr[LANE_W-1:0] == LANE_W'(m);
      dmem_bank #(.DEPTH(1 << DROW_W)) u_bank (
        .clk,
        .a_en(m_en[gr][m]), .a_we(m_we[gr][m]), .a_addr(m_addr[gr][m]),
        .a_wdata(m_wdata[gr][m]), .a_rdata(m_rdata[gr][m]),
        .b_en(h_sel), .b_we(host_dmem_we), .b_addr(host_dmem_addr[DADDR_W-2:LANE_W]),
        .b_wdata(host_dmem_wdata), .b_rdata(h_rdata[gr][m])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_grp_q  <= 1'b0;
      h_lane_q <= '0;
    end else if (host_dmem_en) begin
      h_grp_q  <= host_dmem_addr[DADDR_W-1];
      h_lane_q <= host_dmem_addr[LANE_W-1:0];
    end
  end
  assign host_dmem_rdata = h_rdata[h_grp_q][h_lane_q];

  assign done = halted && !v_busy;
  assign busy = running || v_busy;

  assign events = '{forward: ev_forward, load_use: ev_load_use, mts_wait: ev_mts_wait,
                    flush: ev_flush, vec_wait: ev_vec_wait, mem_wait: ev_mem_wait,
                    mem_conflict: ev_mem_conflict};
endmodule
