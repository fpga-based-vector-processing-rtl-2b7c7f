// scalar_regfile: scalar register file with the two vector control registers.
//
// Sixteen 32-bit general registers (r0 always reads zero) with two combinational read
// ports and one write port, plus the vector-length register VLR and the vector-mask
// register VMR that the original design places in the scalar register file. VLR (0..VLEN)
// sets how many elements a vector instruction processes; bit i of VMR (VLEN bits) lets
// element i be written. A write in the same cycle as a read of the same register is
// passed straight to the read port, so the write-back stage needs no forwarding path.
// VLR is written with min(value, VLEN); VMR is written 32 bits at a time (chunk `vmr_sel`).
// Register count, widths, the clamp and the bypass are this design's choices.
// Reset: VLR = VLEN, VMR all ones, general registers zero.
module scalar_regfile #(
  parameter int unsigned VLEN  = 32,
  parameter int unsigned VLR_W = $clog2(VLEN + 1),
  parameter int unsigned NCHUNK = (VLEN + 31) / 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ra1,
  output logic [31:0]      rd1,
  input  logic [3:0]       ra2,
  output logic [31:0]      rd2,
  input  logic             we,
  input  logic [3:0]       wa,
  input  logic [31:0]      wd,
  input  logic             vlr_we,
  input  logic             vmr_we,
  input  logic [$clog2(NCHUNK+1)-1:0] vmr_sel,
  input  logic [31:0]      vwd,
  output logic [VLR_W-1:0] vlr,
  output logic [VLEN-1:0]  vmr
);
  logic [31:0] regs [16];
  logic [VLR_W-1:0] vlr_q, vlr_d;
  logic [NCHUNK*32-1:0] vmr_q, vmr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else if (we && wa != 4'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    vlr_d = vlr_q;
    if (vlr_we) vlr_d = (vwd > 32'(VLEN)) ? VLR_W'(VLEN) : VLR_W'(vwd);
    vmr_d = vmr_q;
    if (vmr_we && 32'(vmr_sel) < NCHUNK) vmr_d[vmr_sel*32 +: 32] = vwd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vlr_q <= VLR_W'(VLEN);
      vmr_q <= '1;
    end else begin
      vlr_q <= vlr_d;
      vmr_q <= vmr_d;
    end
  end

  // Write-through: a value being written this cycle is seen by the readers.
  assign rd1 = (ra1 == 4'd0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
  assign rd2 = (ra2 == 4'd0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  assign vlr = vlr_d;
  assign vmr = vmr_d[VLEN-1:0];
endmodule
