// inject_stage: injects a new flit from the local IP core into a free slot.
//
// A flit can enter the router only in a cycle in which one of the four
// input slots is empty (after ejection), so the number of flits never
// exceeds the number of output ports. The core offers a flit with inj_valid;
// inj_ready is high when a slot is free, and the flit is taken in a cycle in
// which both are high. The lowest-numbered free slot is used (this design's
// choice) and the flit's age starts at zero. Combinational.
module inject_stage
  import noc_pkg::*;
(
  input  flit_t [NUM_DIRS-1:0] in_flits,
  input  logic                 inj_valid,
  input  flit_t                inj_flit,
  output logic                 inj_ready,
  output flit_t [NUM_DIRS-1:0] out_flits
);

  logic [NUM_DIRS-1:0] free_sel;  // one-hot lowest free slot

  always_comb begin
    free_sel = '0;
    for (int i = NUM_DIRS-1; i >= 0; i--)
      if (!in_flits[i].valid) begin
        free_sel = '0;
        free_sel[i] = 1'b1;
      end
    inj_ready = |free_sel;
    out_flits = in_flits;
    for (int i = 0; i < NUM_DIRS; i++)
      if (free_sel[i] && inj_valid) begin
        out_flits[i]       = inj_flit;
        out_flits[i].valid = 1'b1;
        out_flits[i].age   = '0;
      end
  end

endmodule
