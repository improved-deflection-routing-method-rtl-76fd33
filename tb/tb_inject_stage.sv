// tb_inject_stage: random slot occupancy; a flit must be accepted only when a
// slot is free, go to the lowest free slot with age 0, and leave the other
// slots unchanged.
module tb_inject_stage;
  import noc_pkg::*;

  flit_t [NUM_DIRS-1:0] in_flits, out_flits;
  logic  inj_valid, inj_ready;
  flit_t inj_flit;
  int checks = 0, failures = 0;

  inject_stage dut (.in_flits, .inj_valid, .inj_flit, .inj_ready, .out_flits);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int slot;
    flit_t exp;
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < NUM_DIRS; i++) begin
        in_flits[i] = flit_t'({$urandom, $urandom});
        in_flits[i].valid = ($urandom_range(0, 2) != 0);
      end
      inj_flit = flit_t'({$urandom, $urandom});
      inj_valid = $urandom_range(0, 1);
      #1;
      slot = -1;
      for (int i = NUM_DIRS - 1; i >= 0; i--) if (!in_flits[i].valid) slot = i;
      checks++;
      if (inj_ready !== (slot >= 0)) begin failures++; $display("FAIL ready"); end
      for (int i = 0; i < NUM_DIRS; i++) begin
        exp = in_flits[i];
        if (i == slot && inj_valid) begin
          exp = inj_flit; exp.valid = 1'b1; exp.age = '0;
        end
        checks++;
        if (out_flits[i] !== exp) begin failures++; $display("FAIL slot %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
