// chipper_permnet: CHIPPER partial two-stage permutation network.
//
// Four 2x2 arbiter blocks replace the global allocator and crossbar.
// Stage 1: block A takes inputs N and E, block B takes S and W. Output 0 of
// each stage-1 block leads to stage-2 block C, which drives outputs N and S;
// output 1 leads to block D, which drives E and W. In stage 1 a flit wants
// the stage-2 block that owns one of its productive ports (the Y pair first);
// in stage 2 it wants its productive port itself. Productive ports are
// computed from the flit's destination and this router's coordinates. Four
// random priority bits (one per block) come from the router. The block
// structure is CHIPPER's; the pairing of ports is this design's choice, as
// the network is only named. Combinational.
module chipper_permnet
  import noc_pkg::*;
(
  input  flit_t [NUM_DIRS-1:0] in_flits,
  input  coord_t               cur_x,
  input  coord_t               cur_y,
  input  logic  [3:0]          prio,      // one random bit per arbiter block
  output flit_t [NUM_DIRS-1:0] out_flits
);

  logic [NUM_DIRS-1:0][NUM_DIRS-1:0] p_in;
  logic [NUM_DIRS-1:0] loc_unused;
  flit_t a0, a1, b0, b1;   // stage-1 outputs
  logic [NUM_DIRS-1:0] p_a0, p_a1, p_b0, p_b1, loc2_unused;
  logic [3:0] sw_unused;

  for (genvar i = 0; i < NUM_DIRS; i++) begin : g_rc_in
    route_compute u_rc (.flit(in_flits[i]), .cur_x, .cur_y, .prod(p_in[i]), .is_local(loc_unused[i]));
  end

  // stage 1: want[0] = a Y-direction port (block C), want[1] = an X-direction port (block D)
  chipper_arbiter_block u_blk_a (
    .in_a(in_flits[DIR_N]), .in_b(in_flits[DIR_E]),
    .want_a({p_in[DIR_N][DIR_E] | p_in[DIR_N][DIR_W], p_in[DIR_N][DIR_N] | p_in[DIR_N][DIR_S]}),
    .want_b({p_in[DIR_E][DIR_E] | p_in[DIR_E][DIR_W], p_in[DIR_E][DIR_N] | p_in[DIR_E][DIR_S]}),
    .prio(prio[0]), .out_0(a0), .out_1(a1), .swap(sw_unused[0]));
  chipper_arbiter_block u_blk_b (
    .in_a(in_flits[DIR_S]), .in_b(in_flits[DIR_W]),
    .want_a({p_in[DIR_S][DIR_E] | p_in[DIR_S][DIR_W], p_in[DIR_S][DIR_N] | p_in[DIR_S][DIR_S]}),
    .want_b({p_in[DIR_W][DIR_E] | p_in[DIR_W][DIR_W], p_in[DIR_W][DIR_N] | p_in[DIR_W][DIR_S]}),
    .prio(prio[1]), .out_0(b0), .out_1(b1), .swap(sw_unused[1]));

  route_compute u_rc_a0 (.flit(a0), .cur_x, .cur_y, .prod(p_a0), .is_local(loc2_unused[0]));
  route_compute u_rc_a1 (.flit(a1), .cur_x, .cur_y, .prod(p_a1), .is_local(loc2_unused[1]));
  route_compute u_rc_b0 (.flit(b0), .cur_x, .cur_y, .prod(p_b0), .is_local(loc2_unused[2]));
  route_compute u_rc_b1 (.flit(b1), .cur_x, .cur_y, .prod(p_b1), .is_local(loc2_unused[3]));

  // stage 2: block C drives N (out 0) and S (out 1); block D drives E and W
  chipper_arbiter_block u_blk_c (
    .in_a(a0), .in_b(b0),
    .want_a({p_a0[DIR_S], p_a0[DIR_N]}), .want_b({p_b0[DIR_S], p_b0[DIR_N]}),
    .prio(prio[2]), .out_0(out_flits[DIR_N]), .out_1(out_flits[DIR_S]), .swap(sw_unused[2]));
  chipper_arbiter_block u_blk_d (
    .in_a(a1), .in_b(b1),
    .want_a({p_a1[DIR_W], p_a1[DIR_E]}), .want_b({p_b1[DIR_W], p_b1[DIR_E]}),
    .prio(prio[3]), .out_0(out_flits[DIR_E]), .out_1(out_flits[DIR_W]), .swap(sw_unused[3]));

endmodule
