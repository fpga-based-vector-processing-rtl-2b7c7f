// hazard_unit: data hazard detection (interlock) of the scalar pipeline.
//
// Combinational. Holds the instruction in decode (and the fetch stage behind it) for
// one cycle when it needs a register that a load in execute has not yet read from
// memory (load-use), since the loaded word only exists in the write-back stage. It
// also holds a vector instruction in decode while a move to VLR/VMR is in execute or
// memory access, so every vector instruction sees the vector length and mask written
// before it. All other scalar hazards are solved by forwarding. The original design names a
// hazard detection unit; the two rules are this design's.
module hazard_unit (
  input  logic       id_valid,
  input  logic       id_use_rs,
  input  logic       id_use_rt,
  input  logic [3:0] id_rs,
  input  logic [3:0] id_rt,
  input  logic       id_is_vec,
  input  logic       ex_valid,
  input  logic       ex_is_load,
  input  logic [3:0] ex_rd,
  input  logic       ex_is_mts,
  input  logic       mem_valid,
  input  logic       mem_is_mts,
  output logic       stall_id,
  output logic       load_use,
  output logic       mts_wait
);
  always_comb begin
    load_use = id_valid && ex_valid && ex_is_load && ex_rd != 4'd0 &&
               ((id_use_rs && id_rs == ex_rd) || (id_use_rt && id_rt == ex_rd));
    mts_wait = id_valid && id_is_vec &&
               ((ex_valid && ex_is_mts) || (mem_valid && mem_is_mts));
    stall_id = load_use || mts_wait;
  end
endmodule
