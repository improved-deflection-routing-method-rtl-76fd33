// eject_stage: removes at most one locally addressed flit from the router.
//
// Among the valid input flits whose destination is this router, the oldest
// one (largest age; ties go to the lowest port number) is taken out of its
// slot and handed to the local IP core. The other slots pass through
// unchanged, so further local flits stay in the network and are deflected
// (or looped back) to try again next cycle. Ejecting one flit per cycle
// follows the router description; choosing the oldest is this design's own
// choice. The local core always accepts an ejected flit. Combinational.
module eject_stage
  import noc_pkg::*;
(
  input  flit_t [NUM_DIRS-1:0] in_flits,
  input  logic  [NUM_DIRS-1:0] in_local,   // slot holds a flit addressed here
  output flit_t [NUM_DIRS-1:0] out_flits,  // in_flits with the ejected slot cleared
  output logic                 ej_valid,
  output flit_t                ej_flit,
  output logic  [NUM_DIRS-1:0] ej_sel      // one-hot slot that was ejected
);

  always_comb begin
    ej_sel = '0;
    ej_valid = 1'b0;
    ej_flit = '0;
    for (int i = 0; i < NUM_DIRS; i++) begin
      if (in_local[i] && in_flits[i].valid &&
          (!ej_valid || in_flits[i].age > ej_flit.age)) begin
        ej_valid = 1'b1;
        ej_flit  = in_flits[i];
        ej_sel   = '0;
        ej_sel[i] = 1'b1;
      end
    end
    out_flits = in_flits;
    for (int i = 0; i < NUM_DIRS; i++)
      if (ej_sel[i]) out_flits[i] = '0;
  end

endmodule
