// chipper_arbiter_block: one 2x2 arbiter block of the CHIPPER permutation network.
//
// Two input flits compete for two outputs. The winner is the only valid
// flit, or, when both are valid, the one picked by the random priority bit
// (prio=0: input a wins). The winner takes the output it wants (want bit 0
// first, then bit 1; a flit that wants neither takes output 0); the other
// flit takes the remaining output, deflected if that is not one it wants.
// Each block is a 2x2 crossbar plus this small allocator. Random priority
// follows the evaluated CHIPPER model; the preference order is this design's
// choice. Combinational.
module chipper_arbiter_block
  import noc_pkg::*;
(
  input  flit_t      in_a,
  input  flit_t      in_b,
  input  logic [1:0] want_a,   // outputs productive for in_a
  input  logic [1:0] want_b,
  input  logic       prio,     // random bit: 0 = a has priority, 1 = b
  output flit_t      out_0,
  output flit_t      out_1,
  output logic       swap      // 1: a->out_1, b->out_0
);

  logic b_wins;
  logic win_to_1;  // winner takes output 1

  always_comb begin
    b_wins   = in_b.valid && (!in_a.valid || prio);
    if (b_wins) win_to_1 = !want_b[0] && want_b[1];
    else        win_to_1 = !want_a[0] && want_a[1];
    // a goes to out_1 if a wins and wants 1, or b wins and wants 0
    swap  = b_wins ? !win_to_1 : win_to_1;
    out_0 = swap ? in_b : in_a;
    out_1 = swap ? in_a : in_b;
  end

endmodule
