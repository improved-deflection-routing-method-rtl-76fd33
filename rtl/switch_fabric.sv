// switch_fabric: full 4x4 crossbar of the BLESS router.
//
// Each output port takes the input flit named by the allocator (out_sel) when
// out_valid is set, and is empty otherwise. Any input can reach any output in
// the same cycle. Combinational.
module switch_fabric
  import noc_pkg::*;
(
  input  flit_t [NUM_DIRS-1:0]      in_flits,
  input  logic  [NUM_DIRS-1:0]      out_valid,
  input  logic  [NUM_DIRS-1:0][1:0] out_sel,
  output flit_t [NUM_DIRS-1:0]      out_flits
);

  always_comb begin
    for (int o = 0; o < NUM_DIRS; o++)
      out_flits[o] = out_valid[o] ? in_flits[out_sel[o]] : '0;
  end

endmodule
