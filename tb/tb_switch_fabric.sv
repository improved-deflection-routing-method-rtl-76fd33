// tb_switch_fabric: random selections; every output must carry the selected
// input flit or be empty.
module tb_switch_fabric;
  import noc_pkg::*;

  flit_t [NUM_DIRS-1:0] in_flits, out_flits;
  logic  [NUM_DIRS-1:0] out_valid;
  logic  [NUM_DIRS-1:0][1:0] out_sel;
  int checks = 0, failures = 0;

  switch_fabric dut (.in_flits, .out_valid, .out_sel, .out_flits);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      for (int i = 0; i < NUM_DIRS; i++) begin
        in_flits[i] = flit_t'({$urandom, $urandom});
        in_flits[i].valid = 1'b1;
        out_sel[i] = 2'($urandom);
      end
      out_valid = 4'($urandom);
      #1;
      for (int o = 0; o < NUM_DIRS; o++) begin
        checks++;
        if (out_flits[o] !== (out_valid[o] ? in_flits[out_sel[o]] : flit_t'('0))) begin
          failures++; $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
