// tb_eject_stage: random slot contents; the stage must eject exactly the
// oldest locally addressed flit (lowest port on equal age), clear only that
// slot, and pass the others unchanged.
module tb_eject_stage;
  import noc_pkg::*;

  flit_t [NUM_DIRS-1:0] in_flits, out_flits;
  logic  [NUM_DIRS-1:0] in_local, ej_sel;
  logic  ej_valid;
  flit_t ej_flit;
  int checks = 0, failures = 0;

  eject_stage dut (.in_flits, .in_local, .out_flits, .ej_valid, .ej_flit, .ej_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < NUM_DIRS; i++) begin
        in_flits[i] = flit_t'({$urandom, $urandom});
        in_flits[i].valid = ($urandom_range(0, 3) != 0);
        in_flits[i].age = age_t'($urandom_range(0, 3));   // frequent ties
        in_local[i] = in_flits[i].valid && ($urandom_range(0, 1) == 1);
      end
      #1;
      best = -1;
      for (int i = 0; i < NUM_DIRS; i++)
        if (in_local[i] && (best < 0 || in_flits[i].age > in_flits[best].age)) best = i;
      checks++;
      if (ej_valid !== (best >= 0)) begin failures++; $display("FAIL ej_valid"); end
      if (best >= 0) begin
        checks++;
        if (ej_flit !== in_flits[best] || ej_sel !== 4'(1 << best)) begin
          failures++; $display("FAIL ejected slot %b exp %0d", ej_sel, best);
        end
      end
      for (int i = 0; i < NUM_DIRS; i++) begin
        checks++;
        if (i == best ? out_flits[i].valid !== 1'b0 : out_flits[i] !== in_flits[i]) begin
          failures++; $display("FAIL slot %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
