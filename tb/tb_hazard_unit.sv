// tb_hazard_unit: random pipeline situations; decode must stall exactly on a load-use
// dependence or on a vector instruction behind a VLR/VMR move in execute or memory.
module tb_hazard_unit;
  logic id_valid, id_use_rs, id_use_rt, id_is_vec, ex_valid, ex_is_load, ex_is_mts;
  logic mem_valid, mem_is_mts;
  logic [3:0] id_rs, id_rt, ex_rd;
  logic stall_id, load_use, mts_wait;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_lu = 0, n_mw = 0;
    for (int n = 0; n < 4000; n++) begin
      logic elu, emw;
      {id_valid, id_use_rs, id_use_rt, id_is_vec, ex_valid, ex_is_load, ex_is_mts,
       mem_valid, mem_is_mts} = 9'($urandom);
      id_rs = 4'($urandom_range(0, 3)); id_rt = 4'($urandom_range(0, 3));
      ex_rd = 4'($urandom_range(0, 3));
      #1;
      elu = id_valid && ex_valid && ex_is_load && ex_rd != 0 &&
            ((id_use_rs && id_rs == ex_rd) || (id_use_rt && id_rt == ex_rd));
      emw = id_valid && id_is_vec && ((ex_valid && ex_is_mts) || (mem_valid && mem_is_mts));
      n_lu += int'(elu); n_mw += int'(emw);
      checks += 3;
      if (load_use !== elu) failures++;
      if (mts_wait !== emw) failures++;
      if (stall_id !== (elu || emw)) failures++;
    end
    checks++;
    if (n_lu == 0 || n_mw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
